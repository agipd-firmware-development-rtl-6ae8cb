// desc_extractor: "filtering and extracting" of the train descriptors from
// the bunch table.
//
// After a train, the bunch table is scanned once in bunch order, one entry
// per clock. Every entry whose veto flag is clear is a stored image: its
// bunch number (the pulse ID) and its cell ID are appended to the descriptor
// RAM. The descriptors therefore come out in pulse-ID order, as the train
// builder format asks. At most NUM_CELLS bunches can be good in one train,
// because every good bunch keeps its own storage cell; that sizes the RAM.
//
// Interface: start begins a scan (ignored while busy). The scan drives the
// table read port lut_rd_* (one clock read latency) for NUM_BUNCHES + 1
// clocks, then done pulses with pulse_count valid. desc_rd_addr reads the
// descriptor RAM with one clock latency; the packing of an entry,
// {pulse ID, cell ID}, is this design's choice.
module desc_extractor
  import agipd_pkg::*;
#(
  parameter int unsigned NUM_BUNCHES = 2700,
  parameter int unsigned NUM_CELLS   = 352,
  localparam int unsigned BAW = $clog2(NUM_BUNCHES),
  localparam int unsigned CW  = $clog2(NUM_CELLS),
  localparam int unsigned DAW = $clog2(NUM_CELLS),
  localparam int unsigned PCW = $clog2(NUM_CELLS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic [PCW-1:0]  pulse_count,
  // bunch table read port
  output logic            lut_rd_en,
  output logic [BAW-1:0]  lut_rd_addr,
  input  entry_t          lut_rd_data,
  // descriptor read port
  input  logic [DAW-1:0]  desc_rd_addr,
  output logic [BAW-1:0]  desc_pulse,
  output logic [CW-1:0]   desc_cell
);

  logic [BAW+CW-1:0] dmem [NUM_CELLS];
  logic [BAW+CW-1:0] drd;

  logic [BAW:0]   scan_addr;   // next address to read
  logic           rd_valid;    // lut_rd_data holds entry of rd_bunch
  logic [BAW-1:0] rd_bunch;
  logic           good;

  assign lut_rd_en   = busy && (scan_addr < (BAW+1)'(NUM_BUNCHES));
  assign lut_rd_addr = scan_addr[BAW-1:0];
  assign good        = rd_valid && !lut_rd_data[VETO_BIT] &&
                       (pulse_count < PCW'(NUM_CELLS));

  always_ff @(posedge clk) begin
    if (good) dmem[pulse_count[DAW-1:0]] <= {rd_bunch, CW'(lut_rd_data[CELL_FIELD_W-1:0])};
    drd <= dmem[desc_rd_addr];
  end
  assign desc_pulse = drd[BAW+CW-1:CW];
  assign desc_cell  = drd[CW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      pulse_count <= '0;
      scan_addr   <= '0;
      rd_valid    <= 1'b0;
      rd_bunch    <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= lut_rd_en;
      rd_bunch <= lut_rd_addr;
      if (good) pulse_count <= pulse_count + 1'b1;
      if (!busy) begin
        if (start) begin
          busy        <= 1'b1;
          scan_addr   <= '0;
          pulse_count <= '0;
        end
      end else begin
        if (lut_rd_en) scan_addr <= scan_addr + 1'b1;
        else if (!rd_valid) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
