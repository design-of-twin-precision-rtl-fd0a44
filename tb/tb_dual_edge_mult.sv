// tb_dual_edge_mult -- self-checking test of the clock-pipelined N/2
// multiplier (W = 4). Each cycle random operand pairs, signedness and enable
// are applied. Both products of an enabled cycle must appear one cycle later,
// together, with valid high; after a disabled cycle valid is low and the
// outputs hold. The latency of exactly one cycle is checked through valid.
module tb_dual_edge_mult;
  localparam int W = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, en = 0;
  logic [W-1:0] a1 = 0, b1 = 0, a2 = 0, b2 = 0;
  tp_pkg::sign_pair_t s1 = '0, s2 = '0;
  logic [2*W-1:0] p1, p2;
  logic valid;

  dual_edge_mult #(.W(W)) dut (.clk, .rst, .en, .a1, .b1, .s1, .a2, .b2, .s2, .p1, .p2, .valid);

  always #5 clk = ~clk;

  function automatic logic [2*W-1:0] ref_mul(input logic [W-1:0] a, input logic [W-1:0] b,
                                             input tp_pkg::sign_pair_t s);
    longint av, bv;
    av = (s.a_signed && a[W-1]) ? longint'(a) - (longint'(1) << W) : longint'(a);
    bv = (s.b_signed && b[W-1]) ? longint'(b) - (longint'(1) << W) : longint'(b);
    return (2*W)'(av * bv);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int T = 1000;
  logic              h_en [T];
  logic [2*W-1:0]    h_p1 [T];
  logic [2*W-1:0]    h_p2 [T];

  initial begin
    logic [2*W-1:0] e1, e2;
    e1 = '0; e2 = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < T; t++) begin
      @(posedge clk); #1;
      if (t >= 2) begin
        if (h_en[t-2]) begin e1 = h_p1[t-2]; e2 = h_p2[t-2]; end
        checks++;
        if (valid !== h_en[t-2]) begin
          failures++;
          if (failures < 10) $display("t=%0d valid=%b exp=%b", t, valid, h_en[t-2]);
        end
        checks++;
        if (p1 !== e1 || p2 !== e2) begin
          failures++;
          if (failures < 10) $display("t=%0d p1=%h p2=%h exp %h %h", t, p1, p2, e1, e2);
        end
      end
      en = ($urandom % 4) != 0;
      a1 = W'($urandom); b1 = W'($urandom); a2 = W'($urandom); b2 = W'($urandom);
      s1 = 2'($urandom); s2 = 2'($urandom);
      h_en[t] = en;
      h_p1[t] = ref_mul(a1, b1, s1);
      h_p2[t] = ref_mul(a2, b2, s2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
