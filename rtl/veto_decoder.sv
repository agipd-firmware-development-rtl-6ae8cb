// veto_decoder: deserialiser for the VETO line of the XFEL clock & control
// link, one bit per FEM clock cycle (~99 MHz).
//
// Protocol (follows the VETO protocol table): every command starts with three
// start bits; VETO = 110, NO VETO = 101, GOLDEN = 111 are followed by a 16-bit
// payload made of the 12-bit bunch ID and four zero bits; the reserved code
// 100 has no payload. Choices of this design, not given by the protocol
// table: the line idles at 0, the first 1 after idle is the first start bit,
// all fields are sent MSB first, and a payload whose four trailing bits are
// not zero is still delivered but flagged with frame_err.
//
// Interface: serial input veto_in sampled on every rising clk edge. One cycle
// after the last bit of a frame, cmd_valid pulses for one cycle with cmd,
// bunch_id and frame_err. A 19-bit command thus yields cmd_valid 19 cycles
// after its first start bit was sampled.
module veto_decoder
  import agipd_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   veto_in,
  output logic                   cmd_valid,
  output veto_cmd_e              cmd,
  output logic [BUNCH_ID_W-1:0]  bunch_id,
  output logic                   frame_err
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_PAYLOAD} state_e;

  state_e      state;
  logic [4:0]  bit_cnt;
  logic [1:0]  start_bits;
  logic [15:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      bit_cnt    <= '0;
      start_bits <= '0;
      shreg      <= '0;
      cmd_valid  <= 1'b0;
      cmd        <= VCMD_RESERVED;
      bunch_id   <= '0;
      frame_err  <= 1'b0;
    end else begin
      cmd_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (veto_in) begin
            state   <= S_START;
            bit_cnt <= '0;
          end
        end
        S_START: begin
          start_bits <= {start_bits[0], veto_in};
          if (bit_cnt == 5'd1) begin
            bit_cnt <= '0;
            if ({start_bits[0], veto_in} == 2'b00) begin
              // reserved command: no payload
              cmd_valid <= 1'b1;
              cmd       <= VCMD_RESERVED;
              bunch_id  <= '0;
              frame_err <= 1'b0;
              state     <= S_IDLE;
            end else begin
              state <= S_PAYLOAD;
            end
          end else begin
            bit_cnt <= bit_cnt + 5'd1;
          end
        end
        S_PAYLOAD: begin
          shreg <= {shreg[14:0], veto_in};
          if (bit_cnt == 5'd15) begin
            cmd_valid <= 1'b1;
            cmd       <= veto_cmd_e'(start_bits);
            bunch_id  <= shreg[14:3];
            frame_err <= ({shreg[2:0], veto_in} != 4'b0000);
            state     <= S_IDLE;
            bit_cnt   <= '0;
          end else begin
            bit_cnt <= bit_cnt + 5'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
