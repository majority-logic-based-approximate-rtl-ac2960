// Approximate 7x-multiplicand generator: a7 ~= 7*a, for a signed radix-16
// Booth multiplier.
//
// 7A is formed as 8A - A = 8A + ~A + 1 on N+3 bits. 8A has no bits below bit 3,
// so the three least significant bits are exactly those of ~A + 1. A 3-bit
// exact majority-logic ripple adder computes them, with the +1 as its carry in,
// and its carry out feeds the lowest ARA. Bits 3..4P+2 come from P four-bit
// approximate recoding adders (ara4), which have no carry chain between them.
// The remaining N-4P upper bits come from an exact majority-logic ripple-carry
// adder of ~a_j and a_{j-3}, with the last ARA's carry out as its carry in.
// Each ARA saves 8 voters and 4 voter delays over the exact adder.
// The structure follows the published design. These are this design's own
// choices: the N+3-bit width, the adder that forms the three exact low bits,
// and 0 <= P <= (N-1)/4. Combinational.
module odd7_gen #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 2
) (
  input  logic [N-1:0] a,
  output logic [N+2:0] a7
);
  localparam int unsigned W  = N + 3;
  localparam int unsigned ME = N - 4*P;

  logic [W-1:0]  ax;
  logic [P:0]    c;
  logic [ME-1:0] ex_x, ex_y, ex_s;
  logic          lo_cout, ex_cout;

  assign ax = {{(W-N){a[N-1]}}, a};

  // Exact three low bits of ~A + 1 (8A contributes zeros there)
  ml_rca #(.M(3)) u_low (.x(~ax[2:0]), .y(3'b000), .cin(1'b1), .s(a7[2:0]), .cout(lo_cout));
  assign c[0] = lo_cout;

  for (genvar k = 0; k < P; k++) begin : g_ara
    localparam int unsigned I = 4*k + 3;
    ara4 u_ara (.a(ax[I+3:I-3]), .cin(c[k]), .s(a7[I+3:I]), .cout(c[k+1]));
  end

  for (genvar j = 0; j < ME; j++) begin : g_ex
    assign ex_x[j] = ~ax[4*P+3+j];  // -A, inverted bits
    assign ex_y[j] = ax[4*P+j];     // 8A
  end

  ml_rca #(.M(ME)) u_rca (.x(ex_x), .y(ex_y), .cin(c[P]), .s(ex_s), .cout(ex_cout));
  assign a7[W-1:4*P+3] = ex_s;

  logic unused_cout;
  assign unused_cout = ex_cout;

  initial assert (4*P + 1 <= N) else $error("odd7_gen: P must be at most (N-1)/4");
endmodule
