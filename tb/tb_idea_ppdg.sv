// Testbench for idea_ppdg. For random operands it checks the identity the multiplier
// relies on, d[AB] = sum PPD_i + ~C + 7 (mod 65537), with A = a + 1, B = b + 1 and
// integer arithmetic, and that a zero Booth digit yields PPD_i = 2^(3i) - 1 (operand
// b = 0x7FFF has an all-zero-digit pattern in the middle quadruplets).
module tb_idea_ppdg;
  import idea_pkg::*;
  word_t a, b, ppd [NPPD], cbar;
  int checks = 0, failures = 0;
  idea_ppdg dut (.a, .b, .ppd, .cbar);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint unsigned e, sum;
      case (i)
        0: begin a = 0; b = 0; end
        1: begin a = 16'hFFFF; b = 16'hFFFF; end
        2: begin a = 16'h1234; b = 16'h7FFF; end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      #1;
      e = ((64'(a) + 1) * (64'(b) + 1) + 65537 - 1) % 65537;
      sum = 64'(cbar) + 7;
      for (int k = 0; k < NPPD; k++) sum += 64'(ppd[k]);
      checks++;
      if (sum % 65537 != e) begin failures++; if (failures < 10) $display("a=%h b=%h", a, b); end
      if (i == 2) begin
        // b = 0x7FFF: quadruplets of digits 1..4 are 1111 -> digit 0
        for (int k = 1; k <= 4; k++) begin
          checks++;
          if (ppd[k] != word_t'((1 << (3*k)) - 1)) begin failures++; $display("zero digit %0d: %h", k, ppd[k]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
