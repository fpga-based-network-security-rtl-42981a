// Testbench for idea_ieac_csa: checks x + y + z = sum + carry - 1 (mod 65537) with
// integer arithmetic on random and corner operands.
module tb_idea_ieac_csa;
  logic [15:0] x, y, z, sum, carry;
  int checks = 0, failures = 0;
  idea_ieac_csa dut (.x, .y, .z, .sum, .carry);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint unsigned l, r;
      if (i < 8) begin x = (i & 1) ? '1 : '0; y = (i & 2) ? '1 : '0; z = (i & 4) ? '1 : '0; end
      else begin x = 16'($urandom); y = 16'($urandom); z = 16'($urandom); end
      #1;
      l = (64'(x) + 64'(y) + 64'(z)) % 65537;
      r = (64'(sum) + 64'(carry) + 65537 - 1) % 65537;
      checks++;
      if (l != r) begin failures++; if (failures < 10) $display("%h %h %h -> %h %h", x, y, z, sum, carry); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
