// veto_handler: fills the bunch table of one train and recycles the ASIC
// storage cells of vetoed bunches.
//
// The state machine follows the veto-handling flow chart: IDLE waits for the
// train trigger; "acquire first 352 bunches (regardless of veto)" writes, for
// bunch n = 0..351, the entry {good, cell n} at table address n; "acquire all
// the rest of bunches (veto)" gives each later bunch the cell at the head of
// the reusable-cell FIFO until the bunch scaler reaches 2700. A VETO for an
// already acquired bunch is a read-modify-write on the second table port: the
// entry gets its veto flag set and its cell ID is pushed into the FIFO, so a
// later bunch overwrites that cell. With this rule the worked example of the
// format (18 good bunches, all later bunches vetoed) ends with cells 0x17 and
// 0x18 reused for bunches 0x7fe and 0x7ff, as the example descriptors show.
//
// Choices of this design (the flow chart is silent on them):
//  * bunch_strobe marks each bunch (4.5 MHz bunch clock, 22 FEM clocks);
//  * a bunch that finds the FIFO empty gets {veto, NO_CELL} and is counted in
//    no_cell_cnt: no cell is free for it;
//  * a VETO for a bunch not yet acquired, for a bunch beyond the train or
//    arriving in IDLE is dropped and counted in dropped_veto_cnt; a repeated
//    VETO of the same bunch changes nothing;
//  * after the last bunch a DRAIN state waits DRAIN_CYCLES clocks so that the
//    vetoes of the last bunches still arrive, then train_done pulses;
//  * in IDLE the first table port is handed to the reader (rd_*), which reads
//    the finished table with one clock of latency.
module veto_handler
  import agipd_pkg::*;
#(
  parameter int unsigned NUM_BUNCHES  = 2700,
  parameter int unsigned NUM_CELLS    = 352,
  parameter int unsigned DRAIN_CYCLES = 64,
  localparam int unsigned BAW = $clog2(NUM_BUNCHES),
  localparam int unsigned CW  = $clog2(NUM_CELLS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  train_trigger,
  input  logic                  bunch_strobe,
  input  logic                  veto_valid,
  input  logic [BUNCH_ID_W-1:0] veto_bunch,
  // table read port, usable while idle
  input  logic                  rd_en,
  input  logic [BAW-1:0]        rd_addr,
  output entry_t                rd_data,
  // per-bunch result
  output logic                  assign_valid,
  output logic [BAW-1:0]        assign_bunch,
  output logic [CELL_FIELD_W-1:0] assign_cell,
  // status
  output logic                  busy,
  output logic                  train_done,
  output logic [BAW:0]          bunch_scaler,
  output logic [15:0]           veto_cnt,
  output logic [15:0]           dropped_veto_cnt,
  output logic [15:0]           no_cell_cnt,
  output logic [15:0]           reuse_cnt
);

  typedef enum logic [1:0] {S_IDLE, S_ACQ_FIRST, S_ACQ_REST, S_DRAIN} state_e;

  state_e state;
  logic [$clog2(DRAIN_CYCLES+1)-1:0] drain_cnt;

  // table ports
  logic           a_en, a_we;
  logic [BAW-1:0] a_addr;
  entry_t         a_wdata, a_rdata;
  logic           b_en, b_we;
  logic [BAW-1:0] b_addr;
  entry_t         b_wdata, b_rdata;

  // FIFO
  logic           f_push, f_pop, f_empty, f_full;
  logic [CW-1:0]  f_din, f_dout;
  logic [$clog2(NUM_CELLS+1)-1:0] f_count;

  // veto read-modify-write
  logic           rmw_pending;
  logic [BAW-1:0] rmw_addr;
  logic           veto_accept;

  bunch_lut #(.DEPTH(NUM_BUNCHES), .WIDTH(ENTRY_W)) u_lut (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  cell_fifo #(.DEPTH(NUM_CELLS), .WIDTH(CW)) u_fifo (
    .clk, .rst_n, .clear(train_trigger && state == S_IDLE),
    .push(f_push), .din(f_din), .pop(f_pop), .dout(f_dout),
    .empty(f_empty), .full(f_full), .count(f_count)
  );

  logic acq_strobe;
  assign acq_strobe = bunch_strobe && (state == S_ACQ_FIRST || state == S_ACQ_REST);
  assign f_pop      = acq_strobe && state == S_ACQ_REST && !f_empty;

  // port A: acquisition writes, or the reader while idle
  always_comb begin
    a_en    = 1'b0;
    a_we    = 1'b0;
    a_addr  = rd_addr;
    a_wdata = '0;
    if (acq_strobe) begin
      a_en   = 1'b1;
      a_we   = 1'b1;
      a_addr = bunch_scaler[BAW-1:0];
      if (state == S_ACQ_FIRST)
        a_wdata = make_entry(1'b0, CELL_FIELD_W'(bunch_scaler));
      else if (!f_empty)
        a_wdata = make_entry(1'b0, CELL_FIELD_W'(f_dout));
      else
        a_wdata = make_entry(1'b1, NO_CELL);
    end else if (state == S_IDLE) begin
      a_en = rd_en;
    end
  end
  assign rd_data = a_rdata;

  // port B: veto read-modify-write
  assign veto_accept = veto_valid && !rmw_pending && state != S_IDLE &&
                       ({1'b0, veto_bunch} < (BUNCH_ID_W+1)'(bunch_scaler)) &&
                       (32'(veto_bunch) < NUM_BUNCHES);

  logic rmw_release;
  assign rmw_release = rmw_pending && !b_rdata[VETO_BIT] &&
                       b_rdata[CELL_FIELD_W-1:0] != NO_CELL;

  always_comb begin
    b_en    = 1'b0;
    b_we    = 1'b0;
    b_addr  = BAW'(veto_bunch);
    b_wdata = '0;
    if (rmw_pending) begin
      b_addr  = rmw_addr;
      b_en    = rmw_release;
      b_we    = rmw_release;
      b_wdata = make_entry(1'b1, b_rdata[CELL_FIELD_W-1:0]);
    end else if (veto_accept) begin
      b_en = 1'b1;
    end
  end

  assign f_push = rmw_release;
  assign f_din  = CW'(b_rdata[CELL_FIELD_W-1:0]);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      bunch_scaler     <= '0;
      drain_cnt        <= '0;
      train_done       <= 1'b0;
      rmw_pending      <= 1'b0;
      rmw_addr         <= '0;
      assign_valid     <= 1'b0;
      assign_bunch     <= '0;
      assign_cell      <= '0;
      veto_cnt         <= '0;
      dropped_veto_cnt <= '0;
      no_cell_cnt      <= '0;
      reuse_cnt        <= '0;
    end else begin
      train_done   <= 1'b0;
      assign_valid <= 1'b0;

      // veto pipeline
      rmw_pending <= veto_accept;
      if (veto_accept) rmw_addr <= BAW'(veto_bunch);
      if (veto_valid && !veto_accept) dropped_veto_cnt <= dropped_veto_cnt + 1'b1;
      if (rmw_release) veto_cnt <= veto_cnt + 1'b1;

      if (acq_strobe) begin
        assign_valid <= 1'b1;
        assign_bunch <= bunch_scaler[BAW-1:0];
        assign_cell  <= a_wdata[CELL_FIELD_W-1:0];
        bunch_scaler <= bunch_scaler + 1'b1;
      end

      unique case (state)
        S_IDLE: begin
          if (train_trigger) begin
            state        <= S_ACQ_FIRST;
            bunch_scaler <= '0;
            veto_cnt         <= '0;
            dropped_veto_cnt <= '0;
            no_cell_cnt      <= '0;
            reuse_cnt        <= '0;
          end
        end
        S_ACQ_FIRST: begin
          if (bunch_strobe && bunch_scaler == (BAW+1)'(NUM_CELLS - 1))
            state <= S_ACQ_REST;
        end
        S_ACQ_REST: begin
          if (bunch_strobe) begin
            if (f_empty) no_cell_cnt <= no_cell_cnt + 1'b1;
            else         reuse_cnt   <= reuse_cnt + 1'b1;
            if (bunch_scaler == (BAW+1)'(NUM_BUNCHES - 1)) begin
              state     <= S_DRAIN;
              drain_cnt <= '0;
            end
          end
        end
        S_DRAIN: begin
          if (drain_cnt == ($bits(drain_cnt))'(DRAIN_CYCLES)) begin
            state      <= S_IDLE;
            train_done <= 1'b1;
          end else begin
            drain_cnt <= drain_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
