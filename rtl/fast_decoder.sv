// fast_decoder: deserialiser for the FAST data line of the XFEL clock &
// control link, one bit per FEM clock cycle (~99 MHz).
//
// Protocol (follows the FAST data protocol table): four start bits select the
// command. START = 1100 is followed by an 80-bit payload: the 64-bit train ID,
// the 8-bit bunch pattern index and an 8-bit checksum. STOP = 1010, RESET =
// 1001 and the reserved 1111 carry no payload. Choices of this design: the
// line idles at 0, the first 1 after idle is the first start bit, fields are
// sent MSB first, the checksum is delivered but not verified (its algorithm is
// not part of the protocol table), and any other start pattern pulses
// frame_err.
//
// Interface: serial input fast_in sampled on every rising clk edge. One cycle
// after the last bit of a command the matching one-cycle pulse start_valid,
// stop or reset_cmd (or frame_err) is raised; train_id, bunch_pattern and
// checksum hold the fields of the last START.
module fast_decoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fast_in,
  output logic        start_valid,
  output logic [63:0] train_id,
  output logic [7:0]  bunch_pattern,
  output logic [7:0]  checksum,
  output logic        stop,
  output logic        reset_cmd,
  output logic        frame_err
);

  localparam int unsigned PAYLOAD_BITS = 80;

  typedef enum logic [1:0] {S_IDLE, S_START, S_PAYLOAD} state_e;

  state_e      state;
  logic [6:0]  bit_cnt;
  logic [1:0]  start_bits;
  logic [PAYLOAD_BITS-1:0] shreg;
  logic [2:0]  code;

  assign code = {start_bits, fast_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      bit_cnt       <= '0;
      start_bits    <= '0;
      shreg         <= '0;
      start_valid   <= 1'b0;
      train_id      <= '0;
      bunch_pattern <= '0;
      checksum      <= '0;
      stop          <= 1'b0;
      reset_cmd     <= 1'b0;
      frame_err     <= 1'b0;
    end else begin
      start_valid <= 1'b0;
      stop        <= 1'b0;
      reset_cmd   <= 1'b0;
      frame_err   <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (fast_in) begin
            state   <= S_START;
            bit_cnt <= '0;
          end
        end
        S_START: begin
          start_bits <= {start_bits[0], fast_in};
          if (bit_cnt == 7'd2) begin
            bit_cnt <= '0;
            state   <= S_IDLE;
            unique case (code)
              3'b100: state     <= S_PAYLOAD;  // START
              3'b010: stop      <= 1'b1;       // STOP
              3'b001: reset_cmd <= 1'b1;       // RESET
              3'b111: ;                        // reserved: ignored
              default: frame_err <= 1'b1;
            endcase
          end else begin
            bit_cnt <= bit_cnt + 7'd1;
          end
        end
        S_PAYLOAD: begin
          shreg <= {shreg[PAYLOAD_BITS-2:0], fast_in};
          if (bit_cnt == 7'(PAYLOAD_BITS - 1)) begin
            start_valid   <= 1'b1;
            train_id      <= shreg[PAYLOAD_BITS-2 -: 64];
            bunch_pattern <= shreg[14:7];
            checksum      <= {shreg[6:0], fast_in};
            state         <= S_IDLE;
            bit_cnt       <= '0;
          end else begin
            bit_cnt <= bit_cnt + 7'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
