// tb_desc_extractor: fills a bunch-table model with random veto flags and
// cell IDs, runs the extractor and checks the pulse count, every (pulse ID,
// cell ID) descriptor in pulse order, the scan time of NUM_BUNCHES + 2
// clocks, and the cap at NUM_CELLS descriptors when too many bunches are good.
module tb_desc_extractor;
  import agipd_pkg::*;
  localparam int NB = 2700, NC = 352;

  logic clk = 1'b0, rst_n = 1'b0, start = 0;
  logic busy, done, lut_rd_en;
  logic [8:0] pulse_count;
  logic [11:0] lut_rd_addr, desc_pulse;
  entry_t lut_rd_data;
  logic [8:0] desc_rd_addr = 0, desc_cell;
  entry_t tab [NB];
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (lut_rd_en) lut_rd_data <= tab[lut_rd_addr];

  desc_extractor #(.NUM_BUNCHES(NB), .NUM_CELLS(NC)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic run(input int pct_good);
    int gp[$], gc[$];
    longint t0;
    for (int i = 0; i < NB; i++) begin
      bit good;
      good = ($urandom_range(0, 999) < pct_good);
      tab[i] = make_entry(!good, 15'($urandom_range(0, NC - 1)));
      if (good && gp.size() < NC) begin gp.push_back(i); gc.push_back(int'(tab[i][14:0])); end
    end
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    // t0 is taken before the edge that samples start, done is seen after edge NB + 2
    check("scan time", cyc - t0, NB + 3);
    check("pulse_count", pulse_count, gp.size());
    for (int j = 0; j < gp.size(); j++) begin
      desc_rd_addr = 9'(j);
      @(negedge clk);
      check($sformatf("pulse %0d", j), desc_pulse, gp[j]);
      check($sformatf("cell %0d", j), desc_cell, gc[j]);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(7);      // few good bunches, as in the example (18 of 2700)
    run(100);    // about 270 good bunches
    run(300);    // more than 352 good: capped
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
