// mda_filter: multiplier-less inner product by modified distributed arithmetic.
//
// Computes y = sum_j COEF[j] * u[j] for NU constant COEF_W-bit two's
// complement coefficients without a multiplier. The coefficients are viewed as
// a bit matrix: row b holds bit b of every coefficient. For each row the block
// forms the partial sum K[b] = sum of the u[j] whose coefficient has bit b set
// (the "look-up" of the row: since the coefficients are constants, only the
// adders for set bits are built). The rows are then combined by shift and add
// from the most significant row down:
//   acc = -K[COEF_W-1]                  (sign row, two's complement: ~K + 1)
//   acc = 2*acc + K[b]                  for b = COEF_W-2 .. 0
// which equals sum_b 2^b K[b] - 2^(COEF_W-1) K[COEF_W-1] = sum_j COEF[j]*u[j].
// Every addition is a Brent-Kung adder of ACC_W bits; the u[j] are sign- or
// zero-extended to ACC_W first. The result is truncated to OUT_W bits, the
// carries above it being dropped, so y is the inner product modulo 2^OUT_W.
// Purely combinational.
//
// The bit-matrix formulation, the two's complement handling of the sign row
// and the carry rejection follow the published method. The order of the
// shift-add chain (most significant row first) is the one that makes the
// result equal the inner product; the internal width ACC_W is this design's.
module mda_filter #(
  parameter int NU            = 5,
  parameter int U_W           = 5,
  parameter bit U_SIGNED      = 1'b0,
  parameter int COEF_W        = 8,
  parameter int COEF [NU]     = '{77, 34, -10, -2, 3},
  parameter int OUT_W         = 12,
  localparam int ACC_MIN      = U_W + COEF_W + $clog2(NU) + 1,
  localparam int ACC_W        = (ACC_MIN > OUT_W) ? ACC_MIN : OUT_W
) (
  input  logic [NU-1:0][U_W-1:0] u,
  output logic [OUT_W-1:0]       y
);

  for (genvar j = 0; j < NU; j++) begin : g_chk
    if (COEF[j] >= (1 << (COEF_W - 1)) || COEF[j] < -(1 << (COEF_W - 1))) begin : g_bad
      $error("mda_filter: coefficient does not fit in COEF_W bits");
    end
  end

  // sign extension of the inputs to the accumulator width
  logic [NU-1:0][ACC_W-1:0] ue;
  for (genvar j = 0; j < NU; j++) begin : g_ext
    assign ue[j] = {{(ACC_W-U_W){U_SIGNED & u[j][U_W-1]}}, u[j]};
  end

  // row sums K[b]: part[b][j+1] = part[b][j] + (bit b of COEF[j] ? ue[j] : 0)
  logic [COEF_W-1:0][ACC_W-1:0] k_row;
  for (genvar b = 0; b < COEF_W; b++) begin : g_row
    logic [NU:0][ACC_W-1:0] part;
    assign part[0] = '0;
    for (genvar j = 0; j < NU; j++) begin : g_term
      if (((COEF[j] >>> b) & 1) != 0) begin : g_add
        logic cout_unused;
        bk_adder #(.W(ACC_W)) u_add (
          .a (part[j]), .b (ue[j]), .s (part[j+1]), .cout (cout_unused)
        );
      end else begin : g_skip
        assign part[j+1] = part[j];
      end
    end
    assign k_row[b] = part[NU];
  end

  // shift-add over the rows, sign row first and negated
  logic [COEF_W-1:0][ACC_W-1:0] acc;
  logic [COEF_W-1:0]            acc_cout_unused;
  bk_adder #(.W(ACC_W)) u_neg (
    .a    (~k_row[COEF_W-1]),
    .b    (ACC_W'(1)),
    .s    (acc[COEF_W-1]),
    .cout (acc_cout_unused[COEF_W-1])
  );
  for (genvar b = COEF_W - 2; b >= 0; b--) begin : g_acc
    bk_adder #(.W(ACC_W)) u_add (
      .a    ({acc[b+1][ACC_W-2:0], 1'b0}),
      .b    (k_row[b]),
      .s    (acc[b]),
      .cout (acc_cout_unused[b])
    );
  end

  assign y = acc[0][OUT_W-1:0];

endmodule
