// repair_itl: repair interleave (ITL) permutation of one memory word.
//
// Each 20-bit sample of the word is split into fields I, Q and CN, and in each
// field the upper half (the high-sensitivity bits) is exchanged with the lower
// half (the low-sensitivity bits). Applied on the way into the memory it puts
// sensitive data into the cells that normally hold the least significant bits;
// because the exchange is its own inverse, the same block applied on the way
// out restores the original order. Purely combinational, no clock: only wiring
// in hardware. The hard-wired half-for-half exchange of equally wide regions
// follows the repair scheme; the field order inside a sample comes from
// ftdi_pkg.
module repair_itl
  import ftdi_pkg::*;
#(
  parameter int unsigned SAMPLES = 2
) (
  input  logic [SAMPLES*SAMPLE_W-1:0] din,
  output logic [SAMPLES*SAMPLE_W-1:0] dout
);

  function automatic sample_t swap_regions(input sample_t s);
    sample_t r;
    r.i  = {s.i[I_W/2-1:0],   s.i[I_W-1:I_W/2]};
    r.q  = {s.q[Q_W/2-1:0],   s.q[Q_W-1:Q_W/2]};
    r.cn = {s.cn[CN_W/2-1:0], s.cn[CN_W-1:CN_W/2]};
    return r;
  endfunction

  always_comb begin
    for (int s = 0; s < SAMPLES; s++) begin
      dout[s*SAMPLE_W +: SAMPLE_W] = swap_regions(sample_t'(din[s*SAMPLE_W +: SAMPLE_W]));
    end
  end

endmodule
