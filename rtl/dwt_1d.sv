// dwt_1d: one 9/7 DWT filter stage (low-pass and high-pass sub-bands).
//
// The input sample x enters an eight-stage delay line (siso_register), which
// with x itself gives the window X(n) .. X(n-8). Two symmetric pre-adders fold
// that window:
//   low-pass,  9 taps:  m1 = X(n)+X(n-8), m2 = X(n-1)+X(n-7),
//                       m3 = X(n-2)+X(n-6), m4 = X(n-3)+X(n-5), m5 = X(n-4)
//   high-pass, 7 taps:  r1 = X(n-1)+X(n-7), r2 = X(n-2)+X(n-6),
//                       r3 = X(n-3)+X(n-5), r4 = X(n-4)
// and two MDA structures (mda_filter) form
//   yl = 77 m1 + 34 m2 - 10 m3 - 2 m4 + 3 m5        (modulo 2^OUT_W)
//   yh = 71 r1 - 38 r2 -  4 r3 + 6 r4
// Both windows are centred on X(n-4). The filter is combinational from the
// delay line and the current input: yl and yh for the window ending at X(n)
// are valid in the same cycle that X(n) is applied, before the clock edge
// that shifts it in. One output pair is produced every clock; the
// down-sampling by two of the wavelet transform is left to the consumer,
// which keeps every second output. The only state is the delay line
// (8 x IN_W flip-flops).
//
// The low-pass coefficients, the u/m pairing, the 8-stage delay line and the
// 12-bit output width follow the published design. The high-pass
// coefficients, the exact taps of the high-pass window and the reset are this
// design's choices.
module dwt_1d #(
  parameter int IN_W      = dwt_pkg::IN_W,
  parameter bit IN_SIGNED = 1'b0,
  parameter int OUT_W     = dwt_pkg::OUT1_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IN_W-1:0]  x,
  output logic [OUT_W-1:0] yl,
  output logic [OUT_W-1:0] yh
);

  import dwt_pkg::*;

  localparam int U_W = IN_W + 1;

  logic [DEPTH-1:0][IN_W-1:0] taps;
  siso_register #(.W(IN_W), .DEPTH(DEPTH)) u_dly (
    .clk (clk), .rst (rst), .din (x), .taps (taps)
  );

  // window: win[i] = X(n-i)
  logic [DEPTH:0][IN_W-1:0] win;
  assign win = {taps, x};

  logic [LPF_NU-1:0][U_W-1:0] m;
  logic [HPF_NU-1:0][U_W-1:0] r;

  sym_preadd #(.NTAPS(LPF_TAPS), .IN_W(IN_W), .SIGNED(IN_SIGNED)) u_pre_l (
    .win (win[LPF_TAPS-1:0]), .u (m)
  );
  sym_preadd #(.NTAPS(HPF_TAPS), .IN_W(IN_W), .SIGNED(IN_SIGNED)) u_pre_h (
    .win (win[HPF_TAPS:1]), .u (r)
  );

  mda_filter #(
    .NU (LPF_NU), .U_W (U_W), .U_SIGNED (IN_SIGNED), .COEF_W (COEF_W),
    .COEF (LPF_COEF), .OUT_W (OUT_W)
  ) u_mda_l (
    .u (m), .y (yl)
  );
  mda_filter #(
    .NU (HPF_NU), .U_W (U_W), .U_SIGNED (IN_SIGNED), .COEF_W (COEF_W),
    .COEF (HPF_COEF), .OUT_W (OUT_W)
  ) u_mda_h (
    .u (r), .y (yh)
  );

endmodule
