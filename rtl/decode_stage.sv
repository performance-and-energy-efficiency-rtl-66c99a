// decode_stage: decoders and the decode/rename pipeline latch, with width control.
//
// Four decoders turn the fetched words into micro-ops (the fixed 32-bit
// encoding of morph_pkg stands in for x86 length detection and decoding). The
// decoded group is held in a pipeline latch split into an always-on half
// (lanes 0-1) and a half that is turned off in reduced-width mode (lanes 2-3),
// as in the document's register-level clock gating: the valid bits of all
// lanes are always clocked, but the upper valid bits are forced to Not Valid,
// and the data latches of the upper lanes are not loaded (their clock enable is
// off) while half_width is set.
//
// Timing: one cycle from in_grp to out_uops; the latch holds while stall.
module decode_stage
  import morph_pkg::*;
#(
  parameter int W = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               half_width,
  input  logic               stall,
  input  fetch_slot_t [W-1:0] in_grp,
  output uop_t [W-1:0]        out_uops
);
  logic [W-1:0] valid_q;
  uop_t [W-1:0] data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (!stall)
      for (int i = 0; i < W; i++)
        valid_q[i] <= in_grp[i].valid && !(half_width && i >= W/2);
  end

  // Data latches: the upper half is clock-gated in reduced-width mode.
  always_ff @(posedge clk) begin
    if (!stall)
      for (int i = 0; i < W; i++)
        if (!(half_width && i >= W/2)) data_q[i] <= decode_word(in_grp[i]);
  end

  always_comb begin
    for (int i = 0; i < W; i++) begin
      out_uops[i]       = data_q[i];
      out_uops[i].valid = valid_q[i];
    end
  end

endmodule
