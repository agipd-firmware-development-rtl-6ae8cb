// ddr2_image_model: behavioural stand-in for the DDR2 image memory and its
// controller, for simulation only. It accepts one read request (image buffer
// number and byte address) at a time and answers with IMAGE_WORDS 64-bit
// words. Word w of buffer b is {16'(b), 16'hc0de, 32'(w)}, so a checker can
// tell which buffer and which word it got. With gaps high, request acceptance
// and data words are delayed at random; without it data flows one word per
// clock. It counts requests whose byte address is not buffer * IMAGE_BYTES.
module ddr2_image_model #(
  parameter int IMAGE_WORDS = 16384,
  parameter int BW          = 10,
  parameter int MAW         = 27
) (
  input  logic           gaps,
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req_valid,
  output logic           req_ready,
  input  logic [BW-1:0]  req_buffer,
  input  logic [MAW-1:0] req_addr,
  output logic           data_valid,
  input  logic           data_ready,
  output logic [63:0]    data,
  output int             requests,
  output int             addr_errors
);
  logic          active;
  int            word;
  logic [BW-1:0] buf_q;

  assign req_ready  = !active && (!gaps || ($urandom_range(0, 3) == 0));
  assign data       = {16'(buf_q), 16'hc0de, 32'(word)};

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; word <= 0; buf_q <= '0; data_valid <= 1'b0;
      requests <= 0; addr_errors <= 0;
    end else begin
      if (!active && req_valid && req_ready) begin
        active <= 1'b1;
        word   <= 0;
        buf_q  <= req_buffer;
        requests <= requests + 1;
        if (longint'(req_addr) != longint'(req_buffer) * longint'(IMAGE_WORDS) * 8)
          addr_errors <= addr_errors + 1;
        data_valid <= !gaps;
      end else if (active) begin
        if (data_valid && data_ready) begin
          if (word == IMAGE_WORDS - 1) begin
            active     <= 1'b0;
            data_valid <= 1'b0;
          end else begin
            word       <= word + 1;
            data_valid <= !gaps || ($urandom_range(0, 4) != 0);
          end
        end else if (!data_valid) begin
          data_valid <= !gaps || ($urandom_range(0, 1) == 0);
        end
      end
    end
  end
endmodule
