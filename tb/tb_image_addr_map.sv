// tb_image_addr_map: checks every cell of every sorting mode against the
// buffer formulas (single: c; interleaved: 2c / 2c+1; separated: c / c+352)
// and the byte address buffer * 131072, plus the buffer numbers printed in the
// sorting figures (#702/#703 for cell 351 interleaved, #352 for the D frame
// of cell 0 and #703 for that of cell 351 separated).
module tb_image_addr_map;
  import agipd_pkg::*;
  sort_mode_e mode;
  logic [8:0] cell_id;
  logic is_d;
  logic [9:0] buffer;
  logic [26:0] byte_addr;
  int checks = 0, failures = 0;

  image_addr_map dut (.*);

  task automatic expect_buf(input sort_mode_e m, input int c, input bit d, input int exp);
    mode = m; cell_id = 9'(c); is_d = d;
    #1;
    checks++;
    if (int'(buffer) != exp || byte_addr != 27'(exp * 131072)) begin
      failures++;
      if (failures < 10) $display("FAIL mode %0d cell %0d d %0b: buf %0d exp %0d addr %h",
                                  m, c, d, buffer, exp, byte_addr);
    end
  endtask

  initial begin
    for (int c = 0; c < 352; c++) begin
      expect_buf(SORT_SINGLE, c, 0, c);
      expect_buf(SORT_SINGLE, c, 1, c);
      expect_buf(SORT_AD_INTERLEAV, c, 0, 2 * c);
      expect_buf(SORT_AD_INTERLEAV, c, 1, 2 * c + 1);
      expect_buf(SORT_AD_SEPARATE, c, 0, c);
      expect_buf(SORT_AD_SEPARATE, c, 1, c + 352);
    end
    expect_buf(SORT_AD_INTERLEAV, 351, 0, 702);
    expect_buf(SORT_AD_INTERLEAV, 351, 1, 703);
    expect_buf(SORT_AD_SEPARATE, 0, 1, 352);
    expect_buf(SORT_AD_SEPARATE, 351, 1, 703);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
