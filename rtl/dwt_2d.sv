// dwt_2d: two-stage DWT giving the LL, LH, HL and HH sub-bands.
//
// The first stage (dwt_1d, unsigned 4-bit samples 0..15) splits the input
// stream into a low-pass stream yl and a high-pass stream yh, 12 bits each,
// two's complement. Each of these feeds a second dwt_1d stage with its own
// 8 x 12-bit delay line, which splits it again:
//   yll = LPF(yl)  ylh = HPF(yl)  yhl = LPF(yh)  yhh = HPF(yh)
// 18 bits each, two's complement, modulo 2^18. The whole datapath is
// combinational from the three delay lines (8x4 + 2 x 8x12 = 224 flip-flops)
// and the current input, so all six outputs for the sample on x are valid in
// the cycle x is applied; one set of outputs is produced per clock.
// Intermediate results wider than the output are truncated (carries above
// the output width are dropped), as in the published design.
//
// The stage structure, widths (4-bit input, 12-bit first-stage and 18-bit
// second-stage outputs) and the sub-band naming follow the published design.
// The second stage processes the first-stage output streams directly, one
// sample per clock, with no decimation and no line buffer: it is a cascade on
// one serial stream, as published, not a row/column transform over an image.
// Bringing the first-stage outputs out as ports is this design's choice.
module dwt_2d #(
  parameter int IN_W   = dwt_pkg::IN_W,
  parameter int OUT1_W = dwt_pkg::OUT1_W,
  parameter int OUT2_W = dwt_pkg::OUT2_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [IN_W-1:0]   x,
  output logic [OUT1_W-1:0] yl,
  output logic [OUT1_W-1:0] yh,
  output logic [OUT2_W-1:0] yll,
  output logic [OUT2_W-1:0] ylh,
  output logic [OUT2_W-1:0] yhl,
  output logic [OUT2_W-1:0] yhh
);

  dwt_1d #(.IN_W(IN_W), .IN_SIGNED(1'b0), .OUT_W(OUT1_W)) u_stage1 (
    .clk (clk), .rst (rst), .x (x), .yl (yl), .yh (yh)
  );

  dwt_1d #(.IN_W(OUT1_W), .IN_SIGNED(1'b1), .OUT_W(OUT2_W)) u_stage2_l (
    .clk (clk), .rst (rst), .x (yl), .yl (yll), .yh (ylh)
  );

  dwt_1d #(.IN_W(OUT1_W), .IN_SIGNED(1'b1), .OUT_W(OUT2_W)) u_stage2_h (
    .clk (clk), .rst (rst), .x (yh), .yl (yhl), .yh (yhh)
  );

endmodule
