// Testbench for bloom_bram_decoder: all BRAM numbers with and without valid_request.
module tb_bloom_bram_decoder;
  logic valid_request;
  logic [2:0] bram_number;
  logic [4:0] sel;
  int checks = 0, failures = 0;
  bloom_bram_decoder #(.N(5), .NW(3)) dut (.valid_request, .bram_number, .sel);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 2; v++)
      for (int n = 0; n < 8; n++) begin
        logic [4:0] e;
        valid_request = 1'(v); bram_number = 3'(n);
        #1;
        e = (v == 1 && n < 5) ? 5'(1 << n) : 5'b0;
        checks++;
        if (sel !== e) begin failures++; $display("v=%0d n=%0d sel=%b", v, n, sel); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
