// tb_parity_tree -- exhaustive check of the odd-parity generator: for every
// 15-bit word the word plus parity bit must hold an odd number of ones.
module tb_parity_tree;
  logic [14:0] data;
  logic parity;
  int checks = 0, failures = 0;

  parity_tree dut (.data, .parity);

  initial begin
    for (int v = 0; v < 32768; v++) begin
      data = 15'(v);
      #1;
      checks++;
      if (($countones(data) + int'(parity)) % 2 != 1) begin
        failures++;
        if (failures < 10) $display("FAIL: data %h parity %0b", data, parity);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
