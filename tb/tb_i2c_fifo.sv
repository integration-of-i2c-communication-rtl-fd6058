// tb_i2c_fifo: self-checking test of the byte FIFO.
// Random push/pop/clear traffic against a queue reference; checks head
// data, full, empty and count every cycle, including pushes when full and
// pops when empty.
module tb_i2c_fifo;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0;
  logic [7:0] wdata = 0, rdata;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [7:0] ref_q[$];
  int n_full = 0, n_empty_pop = 0;

  i2c_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: count=%0d ref=%0d rdata=%h", what, count, ref_q.size(),
               rdata);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // Phases: fill-biased, drain-biased, mixed.
      case ((cyc / 500) % 3)
        0: begin push = ($urandom_range(9) < 8); pop = ($urandom_range(9) < 2); end
        1: begin push = ($urandom_range(9) < 2); pop = ($urandom_range(9) < 8); end
        default: begin push = $urandom_range(1); pop = $urandom_range(1); end
      endcase
      clr   = ($urandom_range(499) == 0);
      wdata = 8'($urandom);
      #1;
      check(empty == (ref_q.size() == 0), "empty");
      check(full == (ref_q.size() == DEPTH), "full");
      check(count == ref_q.size(), "count");
      if (ref_q.size() != 0) check(rdata == ref_q[0], "head data");
      if (full && push) n_full++;
      if (empty && pop) n_empty_pop++;
      @(posedge clk);
      if (clr) ref_q = {};
      else begin
        bit was_full, was_empty;
        was_full  = (ref_q.size() == DEPTH);
        was_empty = (ref_q.size() == 0);
        if (pop && !was_empty) void'(ref_q.pop_front());
        if (push && !was_full) ref_q.push_back(wdata);
      end
    end
    check(n_full > 0, "push while full exercised");
    check(n_empty_pop > 0, "pop while empty exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
