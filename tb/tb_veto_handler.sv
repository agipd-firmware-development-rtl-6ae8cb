// tb_veto_handler: runs trains of 2700 bunches (one bunch_strobe every 22
// clocks, the 4.5 MHz bunch clock on the ~99 MHz FEM clock) through the veto
// handler and compares the whole bunch table with a reference model of the
// cell-reuse rule.
//  Train 1 is the worked example of the format description: only bunches
//  1-4, 0x10-0x13, 0x15, 0x28-0x2a, 0x2c, 0x2d, 0x2f, 0x9b, 0x7fe and 0x7ff are
//  good, every other bunch is vetoed one bunch after it is taken. The table
//  must start 8000 0001 0002 0003 0004 8005 ... and bunches 0x7fe / 0x7ff must
//  get the recycled cells 0x17 / 0x18, as in the example descriptors.
//  Train 2 vetoes few bunches, so the cells run out (no_cell_cnt > 0).
//  Train 3 vetoes at random with random latency and adds vetoes for bunches
//  not yet taken, repeated vetoes and vetoes while idle (all must be dropped
//  or ignored).
// It also checks one table write per strobe and that train_done comes
// DRAIN_CYCLES + 1 clocks after the last bunch.
module tb_veto_handler;
  import agipd_pkg::*;
  localparam int NB = 2700, NC = 352, DRAIN = 64, PERIOD = 22;

  logic clk = 1'b0, rst_n = 1'b0;
  logic train_trigger = 0, bunch_strobe = 0, veto_valid = 0, rd_en = 0;
  logic [11:0] veto_bunch = 0, rd_addr = 0;
  entry_t rd_data;
  logic assign_valid, busy, train_done;
  logic [11:0] assign_bunch;
  logic [14:0] assign_cell;
  logic [12:0] bunch_scaler;
  logic [15:0] veto_cnt, dropped_veto_cnt, no_cell_cnt, reuse_cnt;

  int checks = 0, failures = 0;
  int assigns = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (assign_valid) assigns++;
  end

  veto_handler #(.NUM_BUNCHES(NB), .NUM_CELLS(NC), .DRAIN_CYCLES(DRAIN)) dut (.*);

  // reference model
  entry_t      mtab [NB];
  int          mq[$];
  int          mscaler;
  int          m_veto, m_drop, m_nocell, m_reuse;

  function automatic void m_strobe();
    if (mscaler < NC) mtab[mscaler] = make_entry(1'b0, 15'(mscaler));
    else if (mq.size() > 0) begin mtab[mscaler] = make_entry(1'b0, 15'(mq.pop_front())); m_reuse++; end
    else begin mtab[mscaler] = make_entry(1'b1, NO_CELL); m_nocell++; end
    mscaler++;
  endfunction

  function automatic void m_veto_fn(int id, bit acquiring);
    if (!acquiring || id >= mscaler) begin m_drop++; return; end
    if (!mtab[id][15] && mtab[id][14:0] != NO_CELL) begin
      mq.push_back(int'(mtab[id][14:0]));
      mtab[id][15] = 1'b1;
      m_veto++;
    end
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic send_veto(input int id, input bit acquiring);
    @(negedge clk);
    veto_valid = 1; veto_bunch = 12'(id);
    m_veto_fn(id, acquiring);
    @(negedge clk);
    veto_valid = 0;
    @(negedge clk);
  endtask

  // veto plan: due[slot] holds bunch IDs to veto in that slot
  int due [NB + 8][$];

  task automatic run_train(input int kind);
    longint t_last;
    int a0;
    for (int s = 0; s < NB + 8; s++) due[s].delete();
    for (int n = 0; n < NB; n++) begin
      bit v;
      int lat;
      case (kind)
        1: v = !(n inside {1, 2, 3, 4, 'h10, 'h11, 'h12, 'h13, 'h15, 'h28, 'h29, 'h2a,
                           'h2c, 'h2d, 'h2f, 'h9b, 'h7fe, 'h7ff});
        2: v = ($urandom_range(0, 99) < 5);
        default: v = ($urandom_range(0, 99) < 70);
      endcase
      lat = (kind == 3) ? $urandom_range(0, 3) : 0;
      if (v) due[n + lat].push_back(n);
      if (kind == 3 && $urandom_range(0, 99) < 3) due[n].push_back(n);          // repeat
      if (kind == 3 && $urandom_range(0, 99) < 2 && n + 5 < NB) due[n].push_back(n + 5); // early
    end
    mscaler = 0; mq.delete(); m_veto = 0; m_drop = 0; m_nocell = 0; m_reuse = 0;
    a0 = assigns;
    @(negedge clk) train_trigger = 1;
    @(negedge clk) train_trigger = 0;
    for (int s = 0; s < NB; s++) begin
      repeat (3) @(negedge clk);
      bunch_strobe = 1;
      m_strobe();
      @(negedge clk) bunch_strobe = 0;
      if (s == NB - 1) t_last = cyc;
      foreach (due[s][i]) send_veto(due[s][i], 1'b1);
      while (cyc < t_last + 2 && s == NB - 1) @(negedge clk);
      if (s < NB - 1) while ((cyc % PERIOD) != 0) @(negedge clk);
    end
    for (int s = NB; s < NB + 8; s++) foreach (due[s][i]) send_veto(due[s][i], 1'b1);
    while (!train_done) @(negedge clk);
    check("train_done latency", cyc - t_last, DRAIN + 1);
    check("writes per train", assigns - a0, NB);
    // a veto while idle is dropped
    if (kind == 3) send_veto(5, 1'b0);
    check("veto_cnt", veto_cnt, m_veto);
    check("dropped", dropped_veto_cnt, m_drop);
    check("no_cell", no_cell_cnt, m_nocell);
    check("reuse", reuse_cnt, m_reuse);
    // read back the table
    for (int i = 0; i < NB; i++) begin
      @(negedge clk) rd_en = 1; rd_addr = 12'(i);
      @(negedge clk) rd_en = 0;
      check($sformatf("entry %0d", i), rd_data, mtab[i]);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_train(1);
    // values printed in the worked example
    check("ex bunch 0",    mtab[0],     16'h8000);
    check("ex bunch 1",    mtab[1],     16'h0001);
    check("ex bunch 5",    mtab[5],     16'h8005);
    check("ex bunch 9b",   mtab['h9b],  16'h009b);
    check("ex bunch 127",  mtab['h127], 16'h8127);
    check("ex bunch 7fe",  mtab['h7fe], 16'h0017);
    check("ex bunch 7ff",  mtab['h7ff], 16'h0018);
    run_train(2);
    checks++;
    if (no_cell_cnt == 0) begin failures++; $display("FAIL: cells never ran out"); end
    run_train(3);
    checks++;
    if (dropped_veto_cnt == 0) begin failures++; $display("FAIL: no veto dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
