// tb_cell_fifo: random push / pop / clear traffic against a reference queue,
// checking the first-word-fall-through output, the count and the empty and
// full flags, including simultaneous push and pop when full, at depth 352.
module tb_cell_fifo;
  localparam int DEPTH = 352;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, push, pop, empty, full;
  logic [8:0] din, dout;
  logic [8:0] count;
  logic [8:0] q[$];
  int checks = 0, failures = 0, full_seen = 0;

  always #5 clk = ~clk;

  cell_fifo #(.DEPTH(DEPTH), .WIDTH(9)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (count != 9'(q.size()) || empty != (q.size() == 0) || full != (q.size() == DEPTH) ||
        (q.size() > 0 && dout != q[0])) begin
      failures++;
      if (failures < 10)
        $display("FAIL: count %0d/%0d empty %b full %b dout %0d exp %0d",
                 count, q.size(), empty, full, dout, q.size() ? q[0] : 0);
    end
  endtask

  initial begin
    clear = 0; push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      int bias;
      bias = (phase % 2 == 0) ? 80 : 20;   // fill, then drain
      for (int t = 0; t < 3000; t++) begin
        @(negedge clk);
        check_state();
        if (full) full_seen++;
        push = ($urandom_range(0, 99) < bias);
        pop  = ($urandom_range(0, 99) < 100 - bias) && !empty;
        if (push && full && !pop) push = 0;
        din  = 9'($urandom_range(0, 351));
        clear = (t == 2999 && phase == 2);
        @(posedge clk);
        if (clear) q.delete();
        else begin
          if (pop) void'(q.pop_front());
          if (push) q.push_back(din);
        end
      end
    end
    @(negedge clk);
    check_state();
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
