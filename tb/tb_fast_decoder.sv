// tb_fast_decoder: sends START commands with random train ID, bunch pattern
// index and checksum, STOP, RESET, reserved and invalid start patterns, and
// checks each decoded pulse and field one clock after the last bit.
module tb_fast_decoder;
  logic clk = 1'b0, rst_n = 1'b0, fast_in = 1'b0;
  logic start_valid, stop, reset_cmd, frame_err;
  logic [63:0] train_id;
  logic [7:0] bunch_pattern, checksum;
  int checks = 0, failures = 0, pulses = 0, expected_pulses = 0;

  always #5 clk = ~clk;

  fast_decoder dut (.clk, .rst_n, .fast_in, .start_valid, .train_id, .bunch_pattern,
                    .checksum, .stop, .reset_cmd, .frame_err);

  always @(posedge clk) if (rst_n) pulses += int'(start_valid) + int'(stop) + int'(reset_cmd) + int'(frame_err);

  task automatic send(input logic [3:0] code, input logic [63:0] tid,
                      input logic [7:0] bp, input logic [7:0] cs);
    logic [83:0] bits;
    int n;
    bits = {code, tid, bp, cs};
    n = (code == 4'b1100) ? 84 : 4;
    for (int i = 0; i < n; i++) @(negedge clk) fast_in = bits[83 - i];
    @(negedge clk) fast_in = 1'b0;
    checks++;
    case (code)
      4'b1100: if (!start_valid || train_id != tid || bunch_pattern != bp || checksum != cs) begin
                 failures++; $display("FAIL START %h", tid); end
      4'b1010: if (!stop) begin failures++; $display("FAIL STOP"); end
      4'b1001: if (!reset_cmd) begin failures++; $display("FAIL RESET"); end
      4'b1111: if (start_valid | stop | reset_cmd | frame_err) begin failures++; $display("FAIL reserved"); end
      default: if (!frame_err) begin failures++; $display("FAIL bad code %b", code); end
    endcase
    if (code != 4'b1111) expected_pulses++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(4'b1100, 64'h0123_4567_89ab_cdef, 8'h5a, 8'hc3);
    send(4'b1010, '0, '0, '0);
    send(4'b1001, '0, '0, '0);
    send(4'b1111, '0, '0, '0);
    send(4'b1011, '0, '0, '0);
    for (int t = 0; t < 150; t++) begin
      logic [3:0] code;
      case ($urandom_range(0, 5))
        0, 1: code = 4'b1100;
        2: code = 4'b1010;
        3: code = 4'b1001;
        4: code = 4'b1111;
        default: code = {1'b1, 3'($urandom_range(0, 7))};
      endcase
      repeat ($urandom_range(0, 3)) @(negedge clk);
      send(code, {$urandom, $urandom}, 8'($urandom), 8'($urandom));
    end
    repeat (3) @(negedge clk);
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("FAIL: %0d pulses, expected %0d", pulses, expected_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
