// tb_veto_decoder: sends random VETO-line commands (VETO, NO VETO, GOLDEN,
// reserved, some with bad trailing bits) with random idle gaps and checks
// that each is decoded with the right command, bunch ID and error flag,
// exactly one clock after its last bit, and that no other output pulse occurs.
module tb_veto_decoder;
  import agipd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, veto_in = 1'b0;
  logic cmd_valid, frame_err;
  veto_cmd_e cmd;
  logic [11:0] bunch_id;
  int checks = 0, failures = 0, valids = 0, frames = 0;

  always #5 clk = ~clk;

  veto_decoder dut (.clk, .rst_n, .veto_in, .cmd_valid, .cmd, .bunch_id, .frame_err);

  always @(posedge clk) if (cmd_valid && rst_n) valids++;

  task automatic send(input logic [1:0] c, input logic [11:0] id, input logic [3:0] tail);
    logic [18:0] bits;
    int n;
    bits = {1'b1, c, id, tail};
    n = (c == 2'b00) ? 3 : 19;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) veto_in = bits[18 - i];
    end
    @(negedge clk) veto_in = 1'b0;
    frames++;
    checks++;
    if (!cmd_valid || cmd != veto_cmd_e'(c) ||
        (c != 2'b00 && (bunch_id != id || frame_err != (tail != 0)))) begin
      failures++;
      $display("FAIL: cmd %0d id %0h tail %0h -> valid %0b cmd %0d id %0h err %0b",
               c, id, tail, cmd_valid, cmd, bunch_id, frame_err);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(2'b10, 12'h000, 4'h0);           // VETO bunch 0 (16'h8000 in the table)
    send(2'b01, 12'h001, 4'h0);           // NO VETO bunch 1
    send(2'b11, 12'ha8b, 4'h0);           // GOLDEN
    send(2'b00, 12'h000, 4'h0);           // reserved, no payload
    send(2'b10, 12'hfff, 4'h0);
    for (int t = 0; t < 200; t++) begin
      logic [1:0] c;
      c = 2'($urandom_range(0, 3));
      repeat ($urandom_range(0, 4)) @(negedge clk);
      send(c, 12'($urandom), ($urandom_range(0, 9) == 0) ? 4'($urandom_range(1, 15)) : 4'h0);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (valids != frames) begin
      failures++;
      $display("FAIL: %0d outputs for %0d frames", valids, frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
