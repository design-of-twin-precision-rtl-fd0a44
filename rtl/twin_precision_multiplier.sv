// twin_precision_multiplier -- N-bit twin-precision multiplier built from two
// clock-pipelined N/2-bit multipliers and an adder.
//
// An N x N product needs four N/2 x N/2 sub-products (LL, LH, HL, HH). Each
// dual_edge_mult forms two of them per clock cycle, one in each clock phase,
// so two multipliers replace the usual four:
//   multiplier 0: phase high a_lo * b_lo (LL), phase low a_hi * b_hi (HH)
//   multiplier 1: phase high a_lo * b_hi (LH), phase low a_hi * b_lo (HL)
// pp_adder then sums them with the right weights.
//
// The 2-bit select is decoded by an OR gate and an AND gate, as in the
// design's block diagram. The OR output enables multiplier 0 (any
// multiplication), the AND output enables multiplier 1 (full precision
// only). Hence:
//   sel = 00  idle, both multipliers hold their operands, valid stays low;
//   sel = 01 or 10  twin mode: only multiplier 0 runs and p = {HH, LL},
//             two independent N/2 x N/2 products of the operand halves;
//   sel = 11  full precision: p = a * b, 2N bits.
// tc = 1 takes the operands (in twin mode each half) as two's complement,
// tc = 0 as unsigned.
//
// Timing: a, b, sel and tc are sampled on a rising edge; p, full_out, tc_out
// and valid are valid after the next rising edge (latency one cycle, one
// operation per cycle). rst is synchronous and active high.
//
// Which select value means which mode, the tc input and the pairing of
// sub-products with multipliers are this design's own choices.
module twin_precision_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [1:0]     sel,
  input  logic           tc,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  output logic           full_out,
  output logic           tc_out,
  output logic           valid
);
  localparam int unsigned H = N / 2;

  logic any_on, both_on;
  assign any_on  = sel[1] | sel[0];   // OR gate
  assign both_on = sel[1] & sel[0];   // AND gate

  logic [H-1:0] a_lo, a_hi, b_lo, b_hi;
  assign {a_hi, a_lo} = a;
  assign {b_hi, b_lo} = b;

  // In full mode the low halves are magnitudes; in twin mode every half is
  // a number of its own.
  tp_pkg::sign_pair_t s_ll, s_hh, s_lh, s_hl;
  always_comb begin
    s_ll = '{a_signed: tc & ~both_on, b_signed: tc & ~both_on};
    s_hh = '{a_signed: tc,            b_signed: tc};
    s_lh = '{a_signed: 1'b0,          b_signed: tc};
    s_hl = '{a_signed: tc,            b_signed: 1'b0};
  end

  logic [N-1:0] ll, hh, lh, hl;
  logic         valid0, valid1;

  dual_edge_mult #(.W(H)) u_mult0 (
    .clk, .rst, .en(any_on),
    .a1(a_lo), .b1(b_lo), .s1(s_ll),
    .a2(a_hi), .b2(b_hi), .s2(s_hh),
    .p1(ll), .p2(hh), .valid(valid0)
  );

  dual_edge_mult #(.W(H)) u_mult1 (
    .clk, .rst, .en(both_on),
    .a1(a_lo), .b1(b_hi), .s1(s_lh),
    .a2(a_hi), .b2(b_lo), .s2(s_hl),
    .p1(lh), .p2(hl), .valid(valid1)
  );

  // Mode travels with the operands: same one-cycle delay as the products.
  logic full_d, tc_d, full_q, tc_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      full_d <= 1'b0;  tc_d <= 1'b0;
      full_q <= 1'b0;  tc_q <= 1'b0;
    end else begin
      if (any_on) begin
        full_d <= both_on;
        tc_d   <= tc;
      end
      full_q <= full_d;
      tc_q   <= tc_d;
    end
  end

  pp_adder #(.N(N)) u_adder (
    .full(full_q), .tc(tc_q),
    .ll, .lh, .hl, .hh,
    .p
  );

  assign full_out = full_q;
  assign tc_out   = tc_q;
  assign valid    = valid0;

  // Multiplier 1 only ever runs together with multiplier 0.
  a_mult1_needs_mult0: assert property (@(posedge clk) disable iff (rst) valid1 |-> valid0);

endmodule
