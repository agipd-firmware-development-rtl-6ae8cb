// tb_train_builder: drives the train builder with random bunch tables (few
// good bunches as in the worked example, and about 300) in all three sorting
// modes, with and without memory gaps and output back-pressure, and compares
// every 64-bit word of the train with the XTDF reference model, plus the
// start / end markers, the number of memory requests and their addresses.
// With no gaps and no back-pressure it also checks that an image passes at one
// word per clock.
module tb_train_builder;
  import agipd_pkg::*;
  import xtdf_ref_pkg::*;
  localparam int NB = 2700, NC = 352, IMAGE_BYTES = 256, IW = IMAGE_BYTES / 8;

  logic clk = 1'b0, rst_n = 1'b0, start = 0;
  sort_mode_e mode = SORT_SINGLE;
  logic [63:0] train_id = 0, data_id = 0, link_id = 0;
  logic busy, done;
  logic [9:0] num_images;
  logic lut_rd_en;
  logic [11:0] lut_rd_addr;
  entry_t lut_rd_data;
  logic mem_req_valid, mem_req_ready, mem_data_valid, mem_data_ready;
  logic [9:0] mem_req_buffer;
  logic [26:0] mem_req_addr;
  logic [63:0] mem_data;
  logic out_valid, out_ready = 1, out_sof, out_last;
  logic [63:0] out_data;
  logic gaps = 0;
  int requests, addr_errors;
  bit bp = 0;

  entry_t tab [NB];
  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [63:0] got[$];
  int sof_pos[$], last_pos[$];
  longint img_t0, rate_errors = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (lut_rd_en) lut_rd_data <= tab[lut_rd_addr];

  train_builder #(.NUM_BUNCHES(NB), .NUM_CELLS(NC), .IMAGE_BYTES(IMAGE_BYTES)) dut (.*);

  ddr2_image_model #(.IMAGE_WORDS(IW), .BW(10), .MAW(27)) u_mem (
    .clk, .rst_n, .gaps, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_buffer(mem_req_buffer), .req_addr(mem_req_addr),
    .data_valid(mem_data_valid), .data_ready(mem_data_ready), .data(mem_data),
    .requests, .addr_errors
  );

  always @(negedge clk) out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (out_valid && out_ready) begin
    if (out_sof) sof_pos.push_back(got.size());
    if (out_last) last_pos.push_back(got.size());
    got.push_back(out_data);
    if (mem_data_valid && mem_data_ready) begin
      if (mem_data[31:0] == 0) img_t0 = cyc;
      if (mem_data[31:0] == IW - 1 && !gaps && !bp && cyc - img_t0 != IW - 1) rate_errors++;
    end
  end

  task automatic check(input string what, input longint got_v, input longint exp);
    checks++;
    if (got_v != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got_v, exp);
    end
  endtask

  task automatic run(input sort_mode_e m, input int permille, input bit g, input bit b);
    xtdf_train ref_t = new();
    word_q_t exp;
    int pulses[$], cells[$];
    logic [15:0] tq[$];
    int r0;
    for (int i = 0; i < NB; i++) begin
      bit good;
      good = ($urandom_range(0, 999) < permille) && pulses.size() < NC;
      tab[i] = make_entry(!good, 15'($urandom_range(0, NC - 1)));
      tq.push_back(tab[i]);
      if (good) begin pulses.push_back(i); cells.push_back(int'(tab[i][14:0])); end
    end
    mode = m; gaps = g; bp = b;
    train_id = {$urandom, $urandom}; data_id = 64'($urandom); link_id = 64'($urandom_range(0, 15));
    exp = ref_t.build(int'(m), train_id, data_id, link_id, pulses, cells, tq, NC, IMAGE_BYTES);
    got.delete(); sof_pos.delete(); last_pos.delete();
    r0 = requests;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    check("word count", got.size(), exp.size());
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check($sformatf("mode %0d word %0d", m, i), got[i], exp[i]);
    check("sof", (sof_pos.size() == 1 && sof_pos[0] == 0), 1);
    check("last", (last_pos.size() == 1 && last_pos[0] == exp.size() - 1), 1);
    check("requests", requests - r0, (m == SORT_SINGLE) ? pulses.size() : 2 * pulses.size());
    check("num_images", num_images, (m == SORT_SINGLE) ? pulses.size() : 2 * pulses.size());
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(SORT_SINGLE, 7, 0, 0);
    run(SORT_AD_INTERLEAV, 7, 0, 0);
    run(SORT_AD_SEPARATE, 7, 1, 1);
    run(SORT_SINGLE, 110, 1, 1);
    run(SORT_AD_INTERLEAV, 110, 1, 0);
    run(SORT_AD_SEPARATE, 110, 0, 1);
    run(SORT_SINGLE, 0, 0, 0);
    check("address errors", addr_errors, 0);
    check("image rate one word per clock", rate_errors, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
