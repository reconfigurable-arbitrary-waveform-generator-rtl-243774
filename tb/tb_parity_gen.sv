// Testbench for parity_gen: all 256 bytes against a count of ones.
module tb_parity_gen;
  logic [7:0] data;
  logic       parity;
  int checks = 0, failures = 0;

  parity_gen #(.W(8)) dut (.data, .parity);

  initial begin
    for (int v = 0; v < 256; v++) begin
      data = 8'(v);
      #1;
      checks++;
      if (parity !== 1'(($countones(data)) % 2)) begin
        failures++;
        $display("FAIL data=%h parity=%b", data, parity);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
