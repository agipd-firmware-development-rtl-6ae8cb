// tb_agipd_readout_top: end-to-end test of the readout train path at its
// default sizes (2700 bunches, 352 cells, 128 KiB images). Everything enters
// through the serial clock & control lines: a START command on the FAST line
// opens a train, one bunch_strobe every 22 clocks marks the bunches, and the
// VETO line carries one command per bunch slot (the decision for the previous
// bunch). The DDR2 image memory is a behavioural model.
//  Train 1: the worked example of the format (18 good bunches, 0x7fe and 0x7ff
//    on recycled cells), single-image mode; the header, descriptor and trailer
//    words printed in the example are checked literally.
//  Trains 2, 3: the same pattern in both A/D modes, with memory gaps and
//    output back-pressure.
//  Train 4: few vetoes, so all 352 cells fill up and later bunches find no
//    cell; NO VETO and GOLDEN commands, vetoes for bunches not yet taken,
//    STOP, RESET, an invalid FAST code and a START during the train.
// Every train is compared word for word with the XTDF reference model, and
// each mechanism (veto, cell reuse, cells exhausted, dropped veto, NO VETO,
// GOLDEN, each sort mode, back-pressure, memory gaps, START overrun, STOP,
// RESET, FAST frame error) must have happened at least once.
module tb_agipd_readout_top;
  import agipd_pkg::*;
  import xtdf_ref_pkg::*;
  localparam int NB = 2700, NC = 352, IMAGE_BYTES = 131072, IW = IMAGE_BYTES / 8;
  localparam int PERIOD = 22;

  logic clk = 1'b0, rst_n = 1'b0;
  logic veto_in = 0, fast_in = 0, bunch_strobe = 0;
  logic [63:0] cc_train_id;
  logic [7:0] cc_bunch_pattern, cc_checksum;
  logic cc_stop, cc_reset;
  sort_mode_e sort_mode = SORT_SINGLE;
  logic [63:0] data_id = 64'h0, link_id = 64'h1;
  logic mem_req_valid, mem_req_ready, mem_data_valid, mem_data_ready;
  logic [9:0] mem_req_buffer;
  logic [26:0] mem_req_addr;
  logic [63:0] mem_data;
  logic out_valid, out_ready = 1, out_sof, out_last;
  logic [63:0] out_data;
  logic [63:0] train_count;
  logic acq_busy, builder_busy, train_sent;
  logic [9:0] num_images;
  logic [12:0] bunch_scaler;
  logic [15:0] veto_cnt, dropped_veto_cnt, no_cell_cnt, reuse_cnt, noveto_cnt, golden_cnt;
  logic [15:0] veto_frame_err_cnt, overrun_cnt, fast_frame_err_cnt;
  logic gaps = 0;
  bit bp = 0;
  int requests, addr_errors;

  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [63:0] got[$];
  int stops = 0, resets = 0, bp_stalls = 0, gap_cycles = 0;
  int mode_seen[3] = '{0, 0, 0};
  int tot_veto = 0, tot_reuse = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (cc_stop && rst_n) stops++;
    if (cc_reset && rst_n) resets++;
    if (out_valid && !out_ready) bp_stalls++;
    if (mem_data_ready && !mem_data_valid && builder_busy) gap_cycles++;
    if (out_valid && out_ready) got.push_back(out_data);
  end
  always @(negedge clk) out_ready = bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  agipd_readout_top dut (.*);

  ddr2_image_model #(.IMAGE_WORDS(IW), .BW(10), .MAW(27)) u_mem (
    .clk, .rst_n, .gaps, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_buffer(mem_req_buffer), .req_addr(mem_req_addr),
    .data_valid(mem_data_valid), .data_ready(mem_data_ready), .data(mem_data),
    .requests, .addr_errors
  );

  task automatic check(input string what, input longint got_v, input longint exp);
    checks++;
    if (got_v != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got_v, exp);
    end
  endtask

  // ---- reference model of the bunch table -------------------------------------------
  entry_t mtab [NB];
  int     mq[$];
  int     mscaler;

  function automatic void m_strobe();
    if (mscaler < NC) mtab[mscaler] = make_entry(1'b0, 15'(mscaler));
    else if (mq.size() > 0) mtab[mscaler] = make_entry(1'b0, 15'(mq.pop_front()));
    else mtab[mscaler] = make_entry(1'b1, NO_CELL);
    mscaler++;
  endfunction

  function automatic void m_veto(int id);
    if (id >= mscaler) return;
    if (!mtab[id][15] && mtab[id][14:0] != NO_CELL) begin
      mq.push_back(int'(mtab[id][14:0]));
      mtab[id][15] = 1'b1;
    end
  endfunction

  // ---- serial line drivers ------------------------------------------------------------
  // FAST line: runs as its own process so it can overlap a train
  logic [83:0] fast_bits;
  int          fast_len = 0;
  bit          fast_go = 0;
  always @(negedge clk) begin
    if (fast_go) begin
      for (int i = 0; i < fast_len; i++) begin
        fast_in = fast_bits[83 - i];
        @(negedge clk);
      end
      fast_in = 0;
      fast_go = 0;
    end
  end

  task automatic fast_send(input logic [3:0] code, input logic [63:0] tid);
    fast_bits = {code, tid, 8'h2a, 8'h5c};
    fast_len  = (code == 4'b1100) ? 84 : 4;
    fast_go   = 1;
    @(negedge clk);
    while (fast_go) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic veto_send(input logic [1:0] c, input int id);
    logic [18:0] bits;
    bits = {1'b1, c, 12'(id), 4'h0};
    for (int i = 0; i < 19; i++) begin
      veto_in = bits[18 - i];
      @(negedge clk);
    end
    veto_in = 0;
  endtask

  // ---- one train ----------------------------------------------------------------------------
  // plan[n]: 0 good, 1 vetoed; extra[n]: command sent in slot n+1 for a good bunch
  // (0 none, 1 NO VETO, 2 GOLDEN, 3 veto of bunch n+6, which is not yet taken)
  bit plan [NB];
  int extra [NB];

  task automatic run_train(input sort_mode_e m, input bit g, input bit b, input int kind);
    xtdf_train ref_t = new();
    word_q_t exp;
    int pulses[$], cells[$];
    logic [15:0] tq[$];
    longint t_slot;
    sort_mode = m; gaps = g; bp = b;
    mode_seen[int'(m)]++;
    mscaler = 0; mq.delete();
    got.delete();
    fast_send(4'b1100, 64'hface_0000_0000_0000 + train_count);
    check("train started", acq_busy, 1);
    for (int n = 0; n <= NB; n++) begin
      t_slot = cyc;
      if (n < NB) begin
        bunch_strobe = 1;
        m_strobe();
        @(negedge clk) bunch_strobe = 0;
      end else @(negedge clk);
      if (kind == 4 && n == 100) fork fast_send(4'b1100, 64'hdead); join_none  // overrun
      if (kind == 4 && n == 300) fork fast_send(4'b1010, 0); join_none         // STOP
      if (kind == 4 && n == 500) fork fast_send(4'b1001, 0); join_none         // RESET
      if (kind == 4 && n == 700) fork fast_send(4'b1101, 0); join_none         // invalid
      if (n > 0) begin
        if (plan[n - 1]) begin
          veto_send(2'b10, n - 1);
          m_veto(n - 1);
        end else if (extra[n - 1] == 1) veto_send(2'b01, n - 1);
        else if (extra[n - 1] == 2) veto_send(2'b11, n - 1);
        else if (extra[n - 1] == 3) veto_send(2'b10, n + 5);
      end
      while (cyc < t_slot + PERIOD) @(negedge clk);
    end
    while (!train_sent) @(negedge clk);
    tot_veto  += int'(veto_cnt);
    tot_reuse += int'(reuse_cnt);
    @(negedge clk);
    for (int i = 0; i < NB; i++) begin
      tq.push_back(mtab[i]);
      if (!mtab[i][15]) begin pulses.push_back(i); cells.push_back(int'(mtab[i][14:0])); end
    end
    exp = ref_t.build(int'(m), train_count, data_id, link_id, pulses, cells, tq, NC, IMAGE_BYTES);
    check("train words", got.size(), exp.size());
    for (int i = 0, bad = 0; i < exp.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        if (bad++ < 5) $display("FAIL train %0d word %0d: got %h exp %h", train_count, i, got[i], exp[i]);
      end
    end
    check("images", num_images, (m == SORT_SINGLE) ? pulses.size() : 2 * pulses.size());
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int good_list[18] = '{1, 2, 3, 4, 'h10, 'h11, 'h12, 'h13, 'h15, 'h28, 'h29, 'h2a,
                          'h2c, 'h2d, 'h2f, 'h9b, 'h7fe, 'h7ff};
    int d0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // ---- train 1: worked example ---------------------------------------------------------
    foreach (plan[n]) begin plan[n] = 1; extra[n] = 0; end
    foreach (good_list[i]) plan[good_list[i]] = 0;
    run_train(SORT_SINGLE, 0, 0, 1);
    check("example header magic", got[0], 64'h5854_4446_beef_face);
    check("example header version", got[1], 64'h0000_0001_0000_0000);
    check("example link id", got[4], 64'h1);
    check("example pulse count", got[5], 64'h12);
    d0 = 8 + 18 * IW;   // first descriptor word
    check("example cell row 1a", got[d0 + 0], 64'h0001_0002_0003_0004);
    check("example cell row 1b", got[d0 + 1], 64'h0010_0011_0012_0013);
    check("example cell row 2a", got[d0 + 2], 64'h0015_0028_0029_002a);
    check("example cell row 2b", got[d0 + 3], 64'h002c_002d_002f_009b);
    check("example cell row 3a", got[d0 + 4], 64'h0017_0018_0000_0000);
    check("example pulse 1",     got[d0 + 8], 64'h0001_0000_0000_0000);
    check("example pulse 2",     got[d0 + 9], 64'h0002_0000_0000_0000);
    check("example pulse 7fe",   got[d0 + 8 + 16], 64'h07fe_0000_0000_0000);
    check("example pulse 7ff",   got[d0 + 8 + 17], 64'h07ff_0000_0000_0000);
    check("example length",      got[d0 + 8 + 20 + 8], 64'h0002_0000_0002_0000);
    check("example bunch table", got[d0 + 8 + 20 + 8 + 12], 64'h8000_0001_0002_0003);
    check("example trailer end", got[got.size() - 1], 64'h5854_4446_dead_abcd);

    // ---- trains 2, 3: A/D modes ------------------------------------------------------------------
    run_train(SORT_AD_INTERLEAV, 1, 1, 2);
    run_train(SORT_AD_SEPARATE, 1, 0, 3);

    // ---- train 4: cells run out ---------------------------------------------------------------
    foreach (plan[n]) begin
      plan[n] = ($urandom_range(0, 99) < 3);
      extra[n] = plan[n] ? 0 : ((n % 97 == 5) ? 1 : (n % 89 == 7) ? 2 : (n % 83 == 11) ? 3 : 0);
    end
    run_train(SORT_SINGLE, 0, 1, 4);

    check("address errors", addr_errors, 0);
    // every mechanism must have happened
    check("veto applied",      tot_veto > 0, 1);
    check("cells reused",      tot_reuse > 0, 1);
    check("cells exhausted",   no_cell_cnt > 0, 1);
    check("veto dropped",      dropped_veto_cnt > 0, 1);
    check("NO VETO decoded",   noveto_cnt > 0, 1);
    check("GOLDEN decoded",    golden_cnt > 0, 1);
    check("START overrun",     overrun_cnt > 0, 1);
    check("FAST frame error",  fast_frame_err_cnt > 0, 1);
    check("STOP decoded",      stops > 0, 1);
    check("RESET decoded",     resets > 0, 1);
    check("back-pressure",     bp_stalls > 0, 1);
    check("memory gaps",       gap_cycles > 0, 1);
    check("all sort modes",    mode_seen[0] > 0 && mode_seen[1] > 0 && mode_seen[2] > 0, 1);
    check("trains sent",       train_count, 4);
    $display("mechanisms: veto %0d reuse %0d no_cell %0d dropped %0d noveto %0d golden %0d overrun %0d fast_err %0d stop %0d reset %0d stalls %0d gaps %0d",
             tot_veto, tot_reuse, no_cell_cnt, dropped_veto_cnt, noveto_cnt, golden_cnt,
             overrun_cnt, fast_frame_err_cnt, stops, resets, bp_stalls, gap_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
