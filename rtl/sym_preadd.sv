// sym_preadd: symmetric pre-adder of a linear-phase FIR window.
//
// A symmetric filter of odd length NTAPS multiplies X(i) and X(NTAPS-1-i) by
// the same coefficient, so the pair is added first and only (NTAPS+1)/2
// products remain. Given the window win[0..NTAPS-1] (win[0] the newest
// sample), the block returns
//   u[k]      = win[k] + win[NTAPS-1-k]   for k = 0 .. NTAPS/2-1
//   u[NU-1]   = win[NTAPS/2]              (centre sample, extended only)
// so that u[0] is the outermost pair (u1 in the filter equations) and u[NU-1]
// the centre (u5 for the 9-tap low-pass, r4 for the 7-tap high-pass). Each
// pair is added by a Brent-Kung adder one bit wider than the samples, after
// sign extension (SIGNED = 1) or zero extension (SIGNED = 0), so no sum can
// overflow. Purely combinational. The pairing follows the published filter
// equations; the extension rule and output width are this design's choices.
module sym_preadd #(
  parameter int NTAPS  = 9,
  parameter int IN_W   = 4,
  parameter bit SIGNED = 1'b0,
  localparam int NU    = (NTAPS + 1) / 2,
  localparam int U_W   = IN_W + 1
) (
  input  logic [NTAPS-1:0][IN_W-1:0] win,
  output logic [NU-1:0][U_W-1:0]     u
);

  if (NTAPS % 2 == 0) begin : g_bad_ntaps
    $error("sym_preadd: NTAPS must be odd");
  end

  function automatic logic [U_W-1:0] extend(input logic [IN_W-1:0] v);
    return {(SIGNED ? v[IN_W-1] : 1'b0), v};
  endfunction

  for (genvar k = 0; k < NTAPS / 2; k++) begin : g_pair
    logic cout_unused;
    bk_adder #(.W(U_W)) u_add (
      .a    (extend(win[k])),
      .b    (extend(win[NTAPS-1-k])),
      .s    (u[k]),
      .cout (cout_unused)
    );
  end

  assign u[NU-1] = extend(win[NTAPS/2]);

endmodule
