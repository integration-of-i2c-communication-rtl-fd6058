// tb_i2c_clk_div: checks that ticks come every prescale+1 clocks for
// several prescale values (including 0 and the 100/400/1000 kbit/s values
// at 100 MHz), that the first tick comes prescale+1 clocks after enable,
// and that no tick is produced while disabled.
module tb_i2c_clk_div;
  logic clk = 0, rst_n = 0, en = 0, tick;
  logic [15:0] prescale = 0;
  int checks = 0, failures = 0;

  i2c_clk_div #(.PRESCALE_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int p);
    int last, t;
    @(negedge clk);
    en = 0; prescale = 16'(p);
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (tick) begin failures++; $display("FAIL tick while disabled"); end
    end
    en = 1;
    last = 0; t = 0;
    for (int k = 0; k < 5; k++) begin
      t = 0;
      do begin @(negedge clk); t++; end while (!tick);
      checks++;
      if (t != p + 1) begin
        failures++;
        $display("FAIL prescale %0d: tick interval %0d, expected %0d", p, t, p + 1);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0); run(1); run(3); run(24); run(62); run(249); run(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
