// Approximate triple-multiplicand generator: a3 ~= 3*a, for a signed radix-8
// (and radix-16) Booth multiplier.
//
// 3A is formed as A + 2A on N+2 bits. Bit 0 is a_0, since 2A has no bit there.
// Bits 1..2P come from P two-bit approximate recoding adders (ara2). They have
// no carry chain between them: each one's carry out is simply its a_i. The
// remaining N+1-2P upper bits come from an exact majority-logic ripple-carry
// adder whose carry in is the last ARA's carry out. So the low bits are cheap
// and shallow, and only the upper, significant bits pay for carry propagation.
// Compared with an exact (N+1)-bit ripple adder this saves 5P voters and 2P
// voter delays.
// The structure follows the published design. The carry in of 0 into the
// lowest ARA, and the range 0 <= P <= N/2, are this design's reading. P = 0
// gives the exact 3A. Combinational.
module odd3_gen #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 5
) (
  input  logic [N-1:0] a,
  output logic [N+1:0] a3
);
  localparam int unsigned W  = N + 2;        // result width
  localparam int unsigned ME = N + 1 - 2*P;  // exact upper bits

  logic [W-1:0] ax;  // a sign-extended to the result width
  logic [P:0]   c;   // approximate carries between ARAs
  logic [ME-1:0] ex_x, ex_y, ex_s;
  logic          ex_cout;

  assign ax   = {{(W-N){a[N-1]}}, a};
  assign a3[0] = ax[0];
  assign c[0]  = 1'b0;

  for (genvar k = 0; k < P; k++) begin : g_ara
    localparam int unsigned I = 2*k + 1;
    ara2 u_ara (.a(ax[I+1:I-1]), .cin(c[k]), .s(a3[I+1:I]), .cout(c[k+1]));
  end

  for (genvar j = 0; j < ME; j++) begin : g_ex
    assign ex_x[j] = ax[2*P+1+j];   // A
    assign ex_y[j] = ax[2*P+j];     // 2A
  end

  ml_rca #(.M(ME)) u_rca (.x(ex_x), .y(ex_y), .cin(c[P]), .s(ex_s), .cout(ex_cout));
  assign a3[W-1:2*P+1] = ex_s;

  // Carry out of the top bit falls outside the N+2-bit result.
  logic unused_cout;
  assign unused_cout = ex_cout;

  initial assert (2*P <= N) else $error("odd3_gen: P must be at most N/2");
endmodule
