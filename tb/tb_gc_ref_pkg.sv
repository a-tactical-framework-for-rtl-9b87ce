// tb_gc_ref_pkg: reference model and heap generator for the garbage
// collector testbenches.
//
// gen_heap() builds a random heap of pairs, vectors, byte vectors and fixed
// (non-relocatable) segments in the model from-space fr[], with pointers
// between the objects, shared objects, cycles and unreachable garbage. It
// returns the root word and the number of words used. collect() is a plain
// sequential Cheney copy of fr[] into to[], written from the algorithm, not
// from the RTL: it gives the expected to-space image, the final allocation
// pointer, and the number of clocks the collector should take, using the
// cost of one clock per control state. flip() makes the to-space the
// from-space of the next collection.
package tb_gc_ref_pkg;
  import gc_pkg::*;

  localparam int N = 4096;   // model memory words

  word_t fr [N];
  word_t to [N];
  int unsigned ref_a;        // allocation pointer after collect()
  int unsigned ref_cycles;   // expected clocks, GO edge to R rising
  // counts of what the heap exercised
  int unsigned n_pair, n_vec, n_bvec, n_fbvec, n_fwd, n_bhdr_skip;

  function automatic word_t mk(tag_t t, int unsigned p);
    return {t, addr_t'(p)};
  endfunction
  function automatic tag_t  tg(word_t x); return x[WORD_W-1:ADDR_W]; endfunction
  function automatic int unsigned pt(word_t x); return int'(x[ADDR_W-1:0]); endfunction
  function automatic int unsigned words_of(int unsigned bytes); return (bytes + 3) / 4; endfunction

  // Build a heap of nobj objects; object 0 is a vector of 6 elements that
  // the root points to.
  function automatic void gen_heap(int unsigned nobj, output word_t root, output int unsigned used);
    int unsigned base [256];
    tag_t        kind [256];
    int unsigned len  [256];
    int unsigned a, r, k;
    a = 0;
    for (int i = 0; i < N; i++) fr[i] = '0;
    for (int unsigned i = 0; i < nobj; i++) begin
      r = $urandom_range(99);
      if (i == 0)      begin kind[i] = TAG_VEC;   len[i] = 6; end
      else if (r < 40) begin kind[i] = TAG_PAIR;  len[i] = 2; end
      else if (r < 65) begin kind[i] = TAG_VEC;   len[i] = $urandom_range(6); end
      else if (r < 85) begin kind[i] = TAG_BVEC;  len[i] = $urandom_range(15); end
      else             begin kind[i] = TAG_FBVEC; len[i] = 2; end
      base[i] = a;
      case (kind[i])
        TAG_PAIR:  a += 2;
        TAG_VEC:   a += 1 + len[i];
        TAG_BVEC:  a += 1 + words_of(len[i]);
        default:   a += 2;
      endcase
    end
    used = a;
    for (int unsigned i = 0; i < nobj; i++) begin
      int unsigned first, cnt;
      first = base[i];
      case (kind[i])
        TAG_PAIR:  cnt = 2;
        TAG_VEC:   begin fr[first] = mk(TAG_VHDR, len[i]); first++; cnt = len[i]; end
        TAG_BVEC:  begin
          fr[first] = mk(TAG_BHDR, len[i]);
          for (int unsigned j = 1; j <= words_of(len[i]); j++) fr[first+j] = $urandom;
          cnt = 0;
        end
        default:   begin
          fr[first] = mk(TAG_IMM, $urandom_range(1000)); fr[first+1] = mk(TAG_IMM, 7); cnt = 0;
        end
      endcase
      for (int unsigned j = 0; j < cnt; j++) begin
        if ($urandom_range(99) < 30) fr[first+j] = mk(TAG_IMM, $urandom_range(32'hff_ffff));
        else begin
          k = $urandom_range(nobj-1);
          fr[first+j] = mk(kind[k], base[k]);
        end
      end
    end
    root = mk(TAG_VEC, base[0]);
  endfunction

  // cost in clocks of the obj part of handling pointer word h, and the copy
  function automatic int unsigned forward_word(word_t h, inout int unsigned a, output word_t nw);
    int unsigned p, sz;
    word_t hd;
    nw = h;
    if (!(tg(h) inside {TAG_PAIR, TAG_VEC, TAG_BVEC, TAG_FBVEC})) return 0;
    p  = pt(h);
    hd = fr[p];
    if (tg(hd) == TAG_FWD) begin
      n_fwd++;
      nw = mk(tg(h), pt(hd));
      return 1;
    end
    case (tg(h))
      TAG_PAIR:  begin sz = 2;                    n_pair++; end
      TAG_VEC:   begin sz = 1 + pt(hd);           n_vec++;  end
      TAG_BVEC:  begin sz = 1 + words_of(pt(hd)); n_bvec++; end
      default:   begin n_fbvec++; return 1; end
    endcase
    for (int unsigned j = 0; j < sz; j++) to[a+j] = fr[p+j];
    fr[p] = mk(TAG_FWD, a);
    nw = mk(tg(h), a);
    a += sz;
    // pair: obj, pair1, pair2; vector/byte vector: obj, vec, loop x (words+1)
    return (tg(h) == TAG_PAIR) ? 3 : (2 + sz);
  endfunction

  function automatic void collect(word_t root);
    int unsigned a, u, cyc;
    word_t nw, h;
    n_pair = 0; n_vec = 0; n_bvec = 0; n_fbvec = 0; n_fwd = 0; n_bhdr_skip = 0;
    a = 1;
    cyc = 1 + 1;                       // start command, then next for the root
    cyc += forward_word(root, a, nw);
    if (nw != root || tg(root) inside {TAG_PAIR, TAG_VEC, TAG_BVEC}) to[0] = nw;
    u = 1;
    while (u != a) begin
      h = to[u];
      cyc += 2;                        // driver, next
      if (tg(h) == TAG_BHDR) begin
        n_bhdr_skip++;
        u += 1 + words_of(pt(h));
      end else begin
        cyc += forward_word(h, a, nw);
        if (tg(h) inside {TAG_PAIR, TAG_VEC, TAG_BVEC} || (tg(h) == TAG_FBVEC && nw != h))
          to[u] = nw;
        u++;
      end
    end
    cyc += 1;                          // final driver: U == A
    ref_a = a;
    ref_cycles = cyc;
  endfunction

  function automatic void flip();
    for (int i = 0; i < N; i++) begin fr[i] = to[i]; to[i] = '0; end
  endfunction
endpackage
