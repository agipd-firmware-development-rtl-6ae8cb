// tb_bunch_lut: random reads and writes on both ports of the bunch table,
// checked against a reference array: one-clock read latency, read-first
// behaviour on a port that reads and writes the same address, and that
// every entry of the 2700-entry table can be written and read back.
module tb_bunch_lut;
  localparam int DEPTH = 2700;
  logic clk = 1'b0;
  logic a_en, a_we, b_en, b_we;
  logic [11:0] a_addr, b_addr;
  logic [15:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [15:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bunch_lut #(.DEPTH(DEPTH), .WIDTH(16)) dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string p, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL port %s: got %h exp %h", p, got, exp);
    end
  endtask

  initial begin
    logic [15:0] ea, eb;
    logic ra, rb;
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill: port A even, port B odd addresses
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 12'(i); a_wdata = 16'($urandom);
      ref_mem[i] = a_wdata;
      b_en = (i + 1 < DEPTH); b_we = b_en; b_addr = 12'(i + 1); b_wdata = 16'($urandom);
      if (b_en) ref_mem[i + 1] = b_wdata;
    end
    // read everything back on port B, random on A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 0; a_we = 0; b_we = 0; b_en = 1; b_addr = 12'(i);
      @(negedge clk);
      check("B", b_rdata, ref_mem[i]);
    end
    // random mixed traffic
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      a_en = $urandom_range(0, 1); a_we = a_en & $urandom_range(0, 1);
      b_en = $urandom_range(0, 1); b_we = b_en & $urandom_range(0, 1);
      a_addr = 12'($urandom_range(0, DEPTH - 1));
      b_addr = 12'($urandom_range(0, DEPTH - 1));
      if (a_we && b_we && a_addr == b_addr) b_we = 0;
      a_wdata = 16'($urandom); b_wdata = 16'($urandom);
      ra = a_en; rb = b_en;
      ea = ref_mem[a_addr]; eb = ref_mem[b_addr];
      if (a_we) ref_mem[a_addr] = a_wdata;
      if (b_we) ref_mem[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (ra) check("A", a_rdata, ea);
      if (rb && !(a_we && a_addr == b_addr)) check("B", b_rdata, eb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
