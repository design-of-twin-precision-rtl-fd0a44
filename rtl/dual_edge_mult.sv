// dual_edge_mult -- clock-pipelined N/2-bit multiplier (two products per cycle
// from one multiplier core).
//
// One bw_multiplier core is shared between two operand pairs. On the rising
// clock edge, when en is high, both pairs (a1,b1) and (a2,b2) are captured
// together with their signedness. During the high clock phase the core works
// on (a1,b1); its result is captured on the falling edge. During the low
// phase the core works on (a2,b2); its result is captured on the next rising
// edge, where the first result is also moved to the output, so p1 and p2
// change together. A multiplier of this kind therefore does the work of two
// ordinary N/2 multipliers, which is where the area saving of the design
// comes from.
//
// The core's input multiplexer is steered by a phase signal built from two
// toggle flip-flops, one on each clock edge (phase = tog_p ^ tog_n is high
// between a rising and the following falling edge). The clock itself is
// never used as data.
//
// en is the block-enable ("sel") pin: with en low the operand registers keep
// their value, the core sees no new inputs and does not switch, and valid
// falls. This stands in for clock gating, as an enable on the flip-flops.
//
// Timing: operands sampled at rising edge k give p1, p2 and valid = 1 after
// rising edge k+1 (latency one cycle, one new operand set per cycle).
// Reset (rst, synchronous, active high) clears all registers.
//
// The two-phase use of one core and the four operand pins follow the design;
// the capture of both pairs on the rising edge, the output re-timing, the
// phase generator and the reset are this design's own choices.
module dual_edge_mult #(
  parameter int unsigned W = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           en,
  input  logic [W-1:0]   a1,
  input  logic [W-1:0]   b1,
  input  tp_pkg::sign_pair_t s1,
  input  logic [W-1:0]   a2,
  input  logic [W-1:0]   b2,
  input  tp_pkg::sign_pair_t s2,
  output logic [2*W-1:0] p1,
  output logic [2*W-1:0] p2,
  output logic           valid
);
  typedef struct packed {
    logic [W-1:0]       a;
    logic [W-1:0]       b;
    tp_pkg::sign_pair_t s;
  } operand_t;

  operand_t op1_q, op2_q, core_in;
  logic     tog_p, tog_n, phase_high;
  logic     loaded_q;   // operand registers were loaded at the last rising edge
  logic [2*W-1:0] core_p, p1_half;

  // Rising-edge registers: operands, second result, output re-timing.
  always_ff @(posedge clk) begin
    if (rst) begin
      op1_q <= '0;
      op2_q <= '0;
      p1    <= '0;
      p2    <= '0;
      valid <= 1'b0;
      loaded_q <= 1'b0;
      tog_p <= 1'b0;
    end else begin
      tog_p    <= ~tog_p;
      loaded_q <= en;
      valid    <= loaded_q;
      if (en) begin
        op1_q <= '{a: a1, b: b1, s: s1};
        op2_q <= '{a: a2, b: b2, s: s2};
      end
      if (loaded_q) begin
        p1 <= p1_half;
        p2 <= core_p;
      end
    end
  end

  // Falling-edge registers: first result.
  always_ff @(negedge clk) begin
    if (rst) begin
      tog_n   <= 1'b0;
      p1_half <= '0;
    end else begin
      tog_n   <= tog_p;
      p1_half <= core_p;
    end
  end

  assign phase_high = tog_p ^ tog_n;
  assign core_in    = phase_high ? op1_q : op2_q;

  bw_multiplier #(.W(W)) u_core (
    .a       (core_in.a),
    .b       (core_in.b),
    .a_signed(core_in.s.a_signed),
    .b_signed(core_in.s.b_signed),
    .p       (core_p)
  );

endmodule
