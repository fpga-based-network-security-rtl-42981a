// Testbench for idea_dim1_add: d[A+B] against (A + B - 1) mod 65537 computed with
// integers from the normal-form values A = a + 1, B = b + 1.
module tb_idea_dim1_add;
  logic [15:0] a, b, s;
  int checks = 0, failures = 0;
  idea_dim1_add dut (.a, .b, .s);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint unsigned e, ua, ub;
      case (i)
        0: begin a = 0; b = 0; end
        1: begin a = 16'hFFFF; b = 1; end
        2: begin a = 16'hFFFF; b = 16'hFFFF; end
        3: begin a = 16'h8000; b = 16'h7FFF; end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      ua = 64'(a) + 1; ub = 64'(b) + 1;
      e = (ua + ub + 65537 - 1) % 65537;
      #1;
      if (e == 65536) continue;          // d[0] is not representable in 16 bits
      checks++;
      if (64'(s) != e) begin failures++; if (failures < 10) $display("%h+%h: %h want %h", a, b, s, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
