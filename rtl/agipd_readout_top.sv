// agipd_readout_top: train path of one AGIPD readout FPGA.
//
// A train starts with a START command on the FAST data line of the clock &
// control link (fast_decoder). From then on every bunch_strobe is one bunch:
// the veto_handler records in the bunch table which ASIC storage cell the
// bunch went to, and VETO commands on the VETO line (veto_decoder) mark bunches
// as bad and free their cells for later bunches. When the last bunch of the
// train (2700) has been handled, the train_builder extracts the descriptors of
// the good bunches, reads their images from the DDR2 image memory in pulse-ID
// order and sends the train in train-builder (XTDF) format on the out_* stream,
// which feeds the 10GE link.
//
// The train ID in the header comes from an internal counter that counts
// START commands, starting at 1 for the first train after reset; the 64-bit
// train ID carried by START is brought out on cc_train_id but not used yet.
// NO VETO and GOLDEN commands are counted; the bunch table has no field for
// "golden". A VETO command whose payload ends in non-zero bits is still
// applied and counted in veto_frame_err_cnt; an unknown FAST start pattern
// is counted in fast_frame_err_cnt. All logic runs on the ~99 MHz
// FEM clock; crossing to the memory and 10GE clock domains is left to the
// memory controller and the MAC. A new train must not start before the
// builder of the previous one has finished (builder_busy low); a START that
// comes earlier is counted in overrun_cnt and ignored.
//
// DDR2 memory (mem_*) and 10GE MAC (out_*) are external and connect through
// the ports: one mem request per image, answered by IMAGE_BYTES/8 words.
module agipd_readout_top
  import agipd_pkg::*;
#(
  parameter int unsigned NUM_BUNCHES  = 2700,
  parameter int unsigned NUM_CELLS    = 352,
  parameter int unsigned IMAGE_BYTES  = 131072,
  parameter int unsigned DRAIN_CYCLES = 64,
  localparam int unsigned BAW = $clog2(NUM_BUNCHES),
  localparam int unsigned PCW = $clog2(NUM_CELLS + 1),
  localparam int unsigned BW  = $clog2(2 * NUM_CELLS),
  localparam int unsigned MAW = $clog2(2 * NUM_CELLS * IMAGE_BYTES)
) (
  input  logic            clk,
  input  logic            rst_n,
  // clock & control link
  input  logic            veto_in,
  input  logic            fast_in,
  input  logic            bunch_strobe,
  output logic [63:0]     cc_train_id,
  output logic [7:0]      cc_bunch_pattern,
  output logic [7:0]      cc_checksum,
  output logic            cc_stop,
  output logic            cc_reset,
  // configuration
  input  sort_mode_e      sort_mode,
  input  logic [63:0]     data_id,
  input  logic [63:0]     link_id,
  // DDR2 image memory read
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output logic [BW-1:0]   mem_req_buffer,
  output logic [MAW-1:0]  mem_req_addr,
  input  logic            mem_data_valid,
  output logic            mem_data_ready,
  input  logic [63:0]     mem_data,
  // train stream to the 10GE MAC
  output logic            out_valid,
  input  logic            out_ready,
  output logic [63:0]     out_data,
  output logic            out_sof,
  output logic            out_last,
  // status
  output logic [63:0]     train_count,
  output logic            acq_busy,
  output logic            builder_busy,
  output logic            train_sent,
  output logic [PCW:0]    num_images,
  output logic [BAW:0]    bunch_scaler,
  output logic [15:0]     veto_cnt,
  output logic [15:0]     dropped_veto_cnt,
  output logic [15:0]     no_cell_cnt,
  output logic [15:0]     reuse_cnt,
  output logic [15:0]     noveto_cnt,
  output logic [15:0]     golden_cnt,
  output logic [15:0]     veto_frame_err_cnt,
  output logic [15:0]     overrun_cnt,
  output logic [15:0]     fast_frame_err_cnt
);

  // --- C&C decoders -------------------------------------------------------------
  logic                  v_valid, v_err;
  veto_cmd_e             v_cmd;
  logic [BUNCH_ID_W-1:0] v_bunch;
  logic                  f_start, f_err;

  veto_decoder u_veto_dec (
    .clk, .rst_n, .veto_in,
    .cmd_valid(v_valid), .cmd(v_cmd), .bunch_id(v_bunch), .frame_err(v_err)
  );

  fast_decoder u_fast_dec (
    .clk, .rst_n, .fast_in,
    .start_valid(f_start), .train_id(cc_train_id), .bunch_pattern(cc_bunch_pattern),
    .checksum(cc_checksum), .stop(cc_stop), .reset_cmd(cc_reset), .frame_err(f_err)
  );

  // --- train trigger and internal train counter -----------------------------------
  logic trigger;
  assign trigger = f_start && !acq_busy && !builder_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      train_count        <= '0;
      noveto_cnt         <= '0;
      golden_cnt         <= '0;
      veto_frame_err_cnt <= '0;
      overrun_cnt        <= '0;
      fast_frame_err_cnt <= '0;
    end else begin
      if (f_err) fast_frame_err_cnt <= fast_frame_err_cnt + 16'd1;
      if (trigger) train_count <= train_count + 64'd1;
      if (f_start && !trigger) overrun_cnt <= overrun_cnt + 16'd1;
      if (v_valid && v_cmd == VCMD_NOVETO) noveto_cnt <= noveto_cnt + 16'd1;
      if (v_valid && v_cmd == VCMD_GOLDEN) golden_cnt <= golden_cnt + 16'd1;
      if (v_valid && v_err) veto_frame_err_cnt <= veto_frame_err_cnt + 16'd1;
    end
  end

  // --- veto handling / bunch table --------------------------------------------------
  logic           train_done;
  logic           lut_rd_en;
  logic [BAW-1:0] lut_rd_addr;
  entry_t         lut_rd_data;
  logic           assign_valid;
  logic [BAW-1:0] assign_bunch;
  logic [CELL_FIELD_W-1:0] assign_cell;

  veto_handler #(
    .NUM_BUNCHES(NUM_BUNCHES), .NUM_CELLS(NUM_CELLS), .DRAIN_CYCLES(DRAIN_CYCLES)
  ) u_veto (
    .clk, .rst_n,
    .train_trigger(trigger), .bunch_strobe,
    .veto_valid(v_valid && v_cmd == VCMD_VETO), .veto_bunch(v_bunch),
    .rd_en(lut_rd_en), .rd_addr(lut_rd_addr), .rd_data(lut_rd_data),
    .assign_valid, .assign_bunch, .assign_cell,
    .busy(acq_busy), .train_done, .bunch_scaler,
    .veto_cnt, .dropped_veto_cnt, .no_cell_cnt, .reuse_cnt
  );

  // --- train builder --------------------------------------------------------------------
  train_builder #(
    .NUM_BUNCHES(NUM_BUNCHES), .NUM_CELLS(NUM_CELLS), .IMAGE_BYTES(IMAGE_BYTES)
  ) u_builder (
    .clk, .rst_n, .start(train_done), .mode(sort_mode),
    .train_id(train_count), .data_id, .link_id,
    .busy(builder_busy), .done(train_sent), .num_images,
    .lut_rd_en, .lut_rd_addr, .lut_rd_data,
    .mem_req_valid, .mem_req_ready, .mem_req_buffer, .mem_req_addr,
    .mem_data_valid, .mem_data_ready, .mem_data,
    .out_valid, .out_ready, .out_data, .out_sof, .out_last
  );

endmodule
