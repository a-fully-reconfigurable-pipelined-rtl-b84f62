// Bit-serial reference model of the PRBS sequence, used by the testbenches.
//
// prbs_ref produces the sequence one bit at a time, the textbook way: the
// next bit is the parity of (polynomial AND history), where the history holds
// the last n bits with bit 0 the newest; the bit is then shifted into the
// history. The seed is the initial history. next_word(w) packs w bits with the
// first bit in word[w-1]. mask_gen/mask_core derive the expected tap masks by
// running the model from single-bit histories (linearity), independently of
// the row recurrence used in the hardware.
package prbs_ref_pkg;

  localparam int RMAX_O = 64;
  localparam int RMAX_W = 512;

  class prbs_ref;
    logic [RMAX_O-1:0] poly;
    logic [RMAX_O-1:0] omask;
    logic [RMAX_O-1:0] hist;
    int                n;

    function new(logic [RMAX_O-1:0] p, logic [RMAX_O-1:0] seed);
      poly  = p;
      n     = 0;
      for (int k = 0; k < RMAX_O; k++) if (p[k]) n = k + 1;
      omask = '0;
      for (int k = 0; k < n; k++) omask[k] = 1'b1;
      hist  = seed & omask;
    endfunction

    function logic next_bit();
      logic y;
      y    = ^(poly & hist);
      hist = ((hist << 1) | RMAX_O'(y)) & omask;
      return y;
    endfunction

    function logic [RMAX_W-1:0] next_word(int w);
      logic [RMAX_W-1:0] word;
      word = '0;
      for (int j = 0; j < w; j++) word[w-1-j] = next_bit();
      return word;
    endfunction
  endclass

  // Mask of output bit `i` of a word of width w: bit k set when that output
  // bit depends on history bit k.
  function automatic logic [RMAX_O-1:0] mask_gen(logic [RMAX_O-1:0] p, int w, int i);
    logic [RMAX_O-1:0] m;
    logic [RMAX_W-1:0] word;
    prbs_ref r;
    m = '0;
    for (int k = 0; k < RMAX_O; k++) begin
      r = new(p, RMAX_O'(1) << k);
      if (r.omask[k]) begin
        word = r.next_word(w);
        m[k] = word[i];
      end
    end
    return m;
  endfunction

  // Mask of core state bit `row` after `steps` serial steps.
  function automatic logic [RMAX_O-1:0] mask_core(logic [RMAX_O-1:0] p, int steps, int row);
    logic [RMAX_O-1:0] m;
    logic              b;
    prbs_ref r;
    m = '0;
    for (int k = 0; k < RMAX_O; k++) begin
      r = new(p, RMAX_O'(1) << k);
      if (r.omask[k]) begin
        for (int s = 0; s < steps; s++) b = r.next_bit();
        m[k] = r.hist[row];
      end
    end
    return m;
  endfunction

endpackage
