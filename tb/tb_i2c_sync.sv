// tb_i2c_sync: the bus-line synchroniser outputs all ones in reset and
// then shows each random input value exactly STAGES rising edges after it
// was applied.
module tb_i2c_sync;
  localparam int STAGES = 2;
  logic clk = 0, rst_n = 0;
  logic [1:0] d = 0, q;
  logic [1:0] hist[$];
  int checks = 0, failures = 0;

  i2c_sync #(.WIDTH(2), .STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (q != 2'b11) begin failures++; $display("FAIL reset value %b", q); end
    rst_n = 1;
    for (int i = 0; i < STAGES; i++) hist.push_back(2'b11);
    for (int c = 0; c < 500; c++) begin
      d = 2'($urandom);
      hist.push_back(d);
      @(negedge clk);
      void'(hist.pop_front());
      checks++;
      if (q != hist[0]) begin
        failures++;
        $display("FAIL cycle %0d: q=%b expected %b", c, q, hist[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
