// Approximate 5x-multiplicand generator: a5 ~= 5*a, for a signed radix-16
// Booth multiplier.
//
// 5A is formed as A + 4A on N+3 bits. Bits 1..0 are a_1 a_0, since 4A has none.
// Bits 2..3P+1 come from P three-bit approximate recoding adders (ara3) without
// a carry chain: each carry out is that slice's a_i. The other N+1-3P upper
// bits come from an exact majority-logic ripple-carry adder, with the last
// ARA's carry out as its carry in. Compared with an exact ripple adder this
// saves 7P voters and 3P voter delays.
// The structure follows the published design. These are this design's own
// choices: the N+3-bit width (the smallest that holds 5A), a carry in of 0
// into the lowest ARA, and 0 <= P <= N/3. Combinational.
module odd5_gen #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 3
) (
  input  logic [N-1:0] a,
  output logic [N+2:0] a5
);
  localparam int unsigned W  = N + 3;
  localparam int unsigned ME = N + 1 - 3*P;

  logic [W-1:0]  ax;
  logic [P:0]    c;
  logic [ME-1:0] ex_x, ex_y, ex_s;
  logic          ex_cout;

  assign ax      = {{(W-N){a[N-1]}}, a};
  assign a5[1:0] = ax[1:0];
  assign c[0]    = 1'b0;

  for (genvar k = 0; k < P; k++) begin : g_ara
    localparam int unsigned I = 3*k + 2;
    ara3 u_ara (.a(ax[I+2:I-2]), .cin(c[k]), .s(a5[I+2:I]), .cout(c[k+1]));
  end

  for (genvar j = 0; j < ME; j++) begin : g_ex
    assign ex_x[j] = ax[3*P+2+j];   // A
    assign ex_y[j] = ax[3*P+j];     // 4A
  end

  ml_rca #(.M(ME)) u_rca (.x(ex_x), .y(ex_y), .cin(c[P]), .s(ex_s), .cout(ex_cout));
  assign a5[W-1:3*P+2] = ex_s;

  logic unused_cout;
  assign unused_cout = ex_cout;

  initial assert (3*P <= N) else $error("odd5_gen: P must be at most N/3");
endmodule
