// tb_dcl_serializer: self-checking test of the 2:1 output stage model:
// bit 1 of the pair is on the line while clk_800p is high, bit 0 while it
// is low, and the pair is differential.
module tb_dcl_serializer;
  logic clk_800p = 0;
  logic [1:0] bit_data = 0;
  logic data_out_p, data_out_n;
  int checks = 0, failures = 0;
  dcl_serializer dut (.*);

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [1:0] b;
      b = 2'($urandom);
      clk_800p = 1; bit_data = b; #1;
      checks++;
      if (data_out_p !== b[1] || data_out_n !== ~b[1]) begin failures++; $display("FAIL high phase"); end
      #4 clk_800p = 0; #1;
      checks++;
      if (data_out_p !== b[0] || data_out_n !== ~b[0]) begin failures++; $display("FAIL low phase"); end
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
