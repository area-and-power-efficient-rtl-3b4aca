// Software model of the offline data preparation, shared by the engine,
// controller and top-level testbenches.
//
// A pruned kernel block is 32 FP32 weights. Its mask has bit i set when
// weight i is non-zero. Its weight words list the non-zero weights in channel
// order, 16 lanes per word: one word when there are at most 16, otherwise
// one word for channels 0-15 and one for channels 16-31. Test values are
// small integers, so every product and sum is exact in FP32 and the expected
// dot products do not depend on the order of additions.
package tb_pwc_pkg;
  import pwc_pkg::*;
  import tb_fp_pkg::*;

  typedef int kblock_t [CH_PER_WORD];

  function automatic mask_t make_mask(input kblock_t w);
    mask_t m = '0;
    for (int i = 0; i < CH_PER_WORD; i++) m[i] = (w[i] != 0);
    return m;
  endfunction

  // Packs the non-zero weights of channels lo..hi into one weight word.
  function automatic lane_vec_t pack_range(input kblock_t w, input int lo, input int hi);
    lane_vec_t v = '0;
    int k = 0;
    for (int i = lo; i <= hi; i++) begin
      if (w[i] != 0) begin
        v[k] = int2f(w[i]);
        k++;
      end
    end
    return v;
  endfunction

  function automatic int nnz(input kblock_t w);
    int n = 0;
    for (int i = 0; i < CH_PER_WORD; i++) n += (w[i] != 0) ? 1 : 0;
    return n;
  endfunction

  // Random kernel block. kind 0: at most 16 non-zero; 1: more than 16;
  // 2: exactly 16; 3: all zero; 4: all non-zero.
  function automatic kblock_t rand_block(input int kind);
    kblock_t w;
    int target, n;
    case (kind)
      0: target = $urandom_range(15, 1);
      1: target = $urandom_range(31, 17);
      2: target = 16;
      3: target = 0;
      default: target = 32;
    endcase
    foreach (w[i]) w[i] = 0;
    n = 0;
    while (n < target) begin
      int i = $urandom_range(CH_PER_WORD - 1);
      if (w[i] == 0) begin
        w[i] = $urandom_range(1) ? int'($urandom_range(8, 1)) : -int'($urandom_range(8, 1));
        n++;
      end
    end
    return w;
  endfunction

  function automatic int rand_act();
    // about a quarter of activations are zero, as after ReLU
    return ($urandom_range(3) == 0) ? 0 : int'($urandom_range(16)) - 8;
  endfunction

endpackage
