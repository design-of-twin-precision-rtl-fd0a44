// tb_bw_multiplier -- self-checking test of the Baugh-Wooley multiplier.
// W = 4 is checked exhaustively for all four signedness mixes; a W = 8
// instance is checked with random operands. The reference is integer
// arithmetic on the operands read as signed or unsigned.
module tb_bw_multiplier;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4;
  logic       as4, bs4;
  logic [7:0] p4;
  bw_multiplier #(.W(4)) dut4 (.a(a4), .b(b4), .a_signed(as4), .b_signed(bs4), .p(p4));

  logic [7:0]  a8, b8;
  logic        as8, bs8;
  logic [15:0] p8;
  bw_multiplier #(.W(8)) dut8 (.a(a8), .b(b8), .a_signed(as8), .b_signed(bs8), .p(p8));

  function automatic longint val(input longint u, input bit s, input int w);
    if (s && u[w-1]) return u - (longint'(1) << w);
    return u;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp;
    for (int s = 0; s < 4; s++) begin
      for (int i = 0; i < 16; i++) begin
        for (int j = 0; j < 16; j++) begin
          a4 = 4'(i); b4 = 4'(j); as4 = s[0]; bs4 = s[1];
          #1;
          exp = val(i, as4, 4) * val(j, bs4, 4);
          checks++;
          if (p4 !== 8'(exp)) begin
            failures++;
            if (failures < 10) $display("W4 FAIL a=%0d b=%0d s=%0d p=%h exp=%h", i, j, s, p4, 8'(exp));
          end
        end
      end
    end
    for (int k = 0; k < 2000; k++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); as8 = 1'($urandom); bs8 = 1'($urandom);
      if (k < 4) begin a8 = (k[0]) ? 8'h80 : 8'hFF; b8 = (k[1]) ? 8'h80 : 8'hFF; as8 = 1; bs8 = 1; end
      #1;
      exp = val(a8, as8, 8) * val(b8, bs8, 8);
      checks++;
      if (p8 !== 16'(exp)) begin
        failures++;
        if (failures < 10) $display("W8 FAIL a=%h b=%h as=%b bs=%b p=%h exp=%h", a8, b8, as8, bs8, p8, 16'(exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
