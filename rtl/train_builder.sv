// train_builder: formats one train of AGIPD data in the XFEL train-builder
// (XTDF) format and sorts the images into pulse-ID order.
//
// When start pulses (the bunch table of a train is complete), the builder
//  1. runs desc_extractor over the bunch table, which leaves the (pulse ID,
//     cell ID) list of the good bunches in pulse-ID order;
//  2. streams the train, in this section order:
//       header       64 bytes: "XTDF" 0xBEEFFACE, major/minor format version
//                    (4 bytes each), train ID, data ID, link ID and the number
//                    of images (8 bytes each), zero padding;
//       images       every image in pulse-ID order, read from its DDR2 image
//                    buffer (image_addr_map gives the buffer of a cell); in
//                    the two A/D modes each pulse has an A and a D image, sent
//                    as a pair;
//       descriptors  four blocks, each zero-padded to a multiple of 32 bytes:
//                    cell ID (2 bytes), pulse ID (8 bytes), status (2 bytes),
//                    length (4 bytes) per image;
//       det.specific the whole bunch table, 2 bytes per bunch, padded to 32;
//       trailer      32 bytes: checksum (16 bytes), status (8 bytes),
//                    "XTDF" 0xDEADABCD.
// These fields, sizes and example values follow the format description. The
// rest is this design's choice: the train ID comes from the train_id input
// (an internal train counter in the top level); the checksum, descriptor
// status and trailer status words are sent as zero because their content is
// not defined; the 16-bit pulse ID is sent in the first 2 bytes of its 8-byte
// field and the length most significant half first, which reproduces the
// example dumps digit for digit; the image count is the number of images
// (twice the number of good pulses in the A/D modes).
//
// Stream: 64-bit words with valid/ready; the first byte of a word on the wire
// is bits [63:56]. out_sof marks the first header word, out_last the last
// trailer word. Descriptor, header and trailer words are assembled 16 bits at
// a time, one 16-bit unit per two clocks; image words pass straight from the
// memory read stream to the output at one word per clock.
//
// Memory read interface: a request (mem_req_valid/ready, buffer number and
// byte address) is followed by exactly IMAGE_BYTES/8 words on mem_data_*.
//
// The bunch table is read through lut_rd_* (one clock latency); the caller
// must not change the table while busy is high.
module train_builder
  import agipd_pkg::*;
#(
  parameter int unsigned NUM_BUNCHES = 2700,
  parameter int unsigned NUM_CELLS   = 352,
  parameter int unsigned IMAGE_BYTES = 131072,
  localparam int unsigned BAW = $clog2(NUM_BUNCHES),
  localparam int unsigned CW  = $clog2(NUM_CELLS),
  localparam int unsigned PCW = $clog2(NUM_CELLS + 1),
  localparam int unsigned BW  = $clog2(2 * NUM_CELLS),
  localparam int unsigned MAW = $clog2(2 * NUM_CELLS * IMAGE_BYTES),
  localparam int unsigned IMAGE_WORDS = IMAGE_BYTES / 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  sort_mode_e      mode,
  input  logic [63:0]     train_id,
  input  logic [63:0]     data_id,
  input  logic [63:0]     link_id,
  output logic            busy,
  output logic            done,
  output logic [PCW:0]    num_images,
  // bunch table read port
  output logic            lut_rd_en,
  output logic [BAW-1:0]  lut_rd_addr,
  input  entry_t          lut_rd_data,
  // image memory read
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output logic [BW-1:0]   mem_req_buffer,
  output logic [MAW-1:0]  mem_req_addr,
  input  logic            mem_data_valid,
  output logic            mem_data_ready,
  input  logic [63:0]     mem_data,
  // train stream
  output logic            out_valid,
  input  logic            out_ready,
  output logic [63:0]     out_data,
  output logic            out_sof,
  output logic            out_last
);

  typedef enum logic [2:0] {
    T_IDLE, T_EXTRACT, T_UNITS, T_DRAIN, T_IMG_FETCH, T_IMG_REQ, T_IMG_DATA
  } tstate_e;

  tstate_e    tstate;
  section_e   sec;
  sort_mode_e mode_q;
  logic [63:0] train_id_q, data_id_q, link_id_q;

  // --- descriptor extraction ------------------------------------------------
  logic           ex_start, ex_busy, ex_done;
  logic [PCW-1:0] pulse_count;
  logic           ex_lut_en;
  logic [BAW-1:0] ex_lut_addr;
  logic [CW-1:0]  desc_rd_addr;
  logic [BAW-1:0] desc_pulse;
  logic [CW-1:0]  desc_cell;

  desc_extractor #(.NUM_BUNCHES(NUM_BUNCHES), .NUM_CELLS(NUM_CELLS)) u_extract (
    .clk, .rst_n, .start(ex_start), .busy(ex_busy), .done(ex_done),
    .pulse_count,
    .lut_rd_en(ex_lut_en), .lut_rd_addr(ex_lut_addr), .lut_rd_data,
    .desc_rd_addr, .desc_pulse, .desc_cell
  );

  // --- unit (16-bit) generator state ------------------------------------------
  logic [15:0] u;        // unit index within the section
  logic [15:0] e;        // entry (image / bunch) index
  logic [1:0]  k;        // unit within entry
  logic        uph;      // 0: fetch, 1: emit
  logic [15:0] n_img;

  logic [15:0] sec_payload, sec_total;
  logic [1:0]  upe_m1;   // units per entry minus one

  assign n_img      = (mode_q == SORT_SINGLE) ? 16'(pulse_count) : 16'(pulse_count) << 1;
  assign num_images = (PCW+1)'(n_img);

  function automatic logic [15:0] round16(logic [15:0] x);
    return (x + 16'd15) & ~16'd15;
  endfunction

  always_comb begin
    unique case (sec)
      SEC_HEADER:  begin upe_m1 = 2'd0; sec_payload = 16'd32; end
      SEC_CELL:    begin upe_m1 = 2'd0; sec_payload = n_img; end
      SEC_PULSE:   begin upe_m1 = 2'd3; sec_payload = n_img << 2; end
      SEC_STATUS:  begin upe_m1 = 2'd0; sec_payload = n_img; end
      SEC_LENGTH:  begin upe_m1 = 2'd1; sec_payload = n_img << 1; end
      SEC_DETSPEC: begin upe_m1 = 2'd0; sec_payload = 16'(NUM_BUNCHES); end
      SEC_TRAILER: begin upe_m1 = 2'd0; sec_payload = 16'd16; end
      default:     begin upe_m1 = 2'd0; sec_payload = 16'd0; end
    endcase
    sec_total = round16(sec_payload);
  end

  function automatic section_e next_sec(section_e s);
    unique case (s)
      SEC_HEADER:  return SEC_IMAGES;
      SEC_CELL:    return SEC_PULSE;
      SEC_PULSE:   return SEC_STATUS;
      SEC_STATUS:  return SEC_LENGTH;
      SEC_LENGTH:  return SEC_DETSPEC;
      SEC_DETSPEC: return SEC_TRAILER;
      default:     return SEC_TRAILER;
    endcase
  endfunction

  // descriptor RAM address: pulse index of image e
  assign desc_rd_addr = CW'((mode_q == SORT_SINGLE) ? e : (e >> 1));

  // bunch table port: extractor while it runs, else the det.specific section
  logic ds_rd;
  assign ds_rd       = (tstate == T_UNITS) && sec == SEC_DETSPEC && !uph &&
                       (e < 16'(NUM_BUNCHES));
  assign lut_rd_en   = ex_busy ? ex_lut_en : ds_rd;
  assign lut_rd_addr = ex_busy ? ex_lut_addr : BAW'(e);

  // header and trailer words
  logic [63:0] hdr_word, trl_word;
  always_comb begin
    unique case (u[4:2])
      3'd0:    hdr_word = MAGIC_BEGIN;
      3'd1:    hdr_word = {FORMAT_MAJOR, FORMAT_MINOR};
      3'd2:    hdr_word = train_id_q;
      3'd3:    hdr_word = data_id_q;
      3'd4:    hdr_word = link_id_q;
      3'd5:    hdr_word = 64'(n_img);
      default: hdr_word = '0;
    endcase
    trl_word = (u[3:2] == 2'd3) ? MAGIC_END : 64'd0;  // checksum, status = 0
  end

  logic [31:0] img_len;
  assign img_len = 32'(IMAGE_BYTES);

  logic [15:0] unit_val;
  logic        in_payload;
  assign in_payload = (u < sec_payload);
  always_comb begin
    unit_val = '0;
    unique case (sec)
      SEC_HEADER:  unit_val = hdr_word[63 - 16*u[1:0] -: 16];
      SEC_TRAILER: unit_val = trl_word[63 - 16*u[1:0] -: 16];
      SEC_CELL:    if (in_payload) unit_val = 16'(desc_cell);
      SEC_PULSE:   if (in_payload && k == 2'd0) unit_val = 16'(desc_pulse);
      SEC_LENGTH:  if (in_payload) unit_val = (k == 2'd0) ? img_len[31:16] : img_len[15:0];
      SEC_DETSPEC: if (in_payload) unit_val = lut_rd_data;
      default:     unit_val = '0;
    endcase
  end

  // --- 4 x 16-bit packer -------------------------------------------------------
  logic [63:0] pk_data;
  logic [2:0]  pk_cnt;
  logic        pk_sof, pk_last;
  logic        unit_valid, unit_ready, pk_fire;

  assign unit_valid = (tstate == T_UNITS) && uph;
  assign unit_ready = (pk_cnt != 3'd4);

  // --- image path ---------------------------------------------------------------
  logic [BW-1:0]  map_buffer;
  logic [MAW-1:0] map_addr;
  logic [$clog2(IMAGE_WORDS+1)-1:0] wcnt;

  image_addr_map #(.NUM_CELLS(NUM_CELLS), .IMAGE_BYTES(IMAGE_BYTES)) u_map (
    .mode(mode_q), .cell_id(desc_cell),
    .is_d((mode_q != SORT_SINGLE) && e[0]),
    .buffer(map_buffer), .byte_addr(map_addr)
  );

  assign mem_req_valid  = (tstate == T_IMG_REQ);
  assign mem_req_buffer = map_buffer;
  assign mem_req_addr   = map_addr;

  logic img_stream;
  assign img_stream     = (tstate == T_IMG_DATA);
  assign mem_data_ready = img_stream && out_ready;

  assign out_valid = img_stream ? mem_data_valid : (pk_cnt == 3'd4);
  assign out_data  = img_stream ? mem_data : pk_data;
  assign out_sof   = !img_stream && pk_sof;
  assign out_last  = !img_stream && pk_last;
  assign pk_fire   = !img_stream && (pk_cnt == 3'd4) && out_ready;

  assign ex_start = (tstate == T_IDLE) && start;
  assign busy     = (tstate != T_IDLE);

  logic unit_fire, sec_end;
  assign unit_fire = unit_valid && unit_ready;
  assign sec_end   = unit_fire && (u == sec_total - 16'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate       <= T_IDLE;
      sec          <= SEC_HEADER;
      mode_q       <= SORT_SINGLE;
      train_id_q   <= '0;
      data_id_q    <= '0;
      link_id_q    <= '0;
      u            <= '0;
      e            <= '0;
      k            <= '0;
      uph          <= 1'b0;
      pk_data      <= '0;
      pk_cnt       <= '0;
      pk_sof       <= 1'b0;
      pk_last      <= 1'b0;
      wcnt         <= '0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;

      // packer
      if (pk_fire) begin
        pk_cnt  <= '0;
        pk_sof  <= 1'b0;
        pk_last <= 1'b0;
      end else if (unit_fire) begin
        pk_data[63 - 16*pk_cnt[1:0] -: 16] <= unit_val;
        pk_cnt <= pk_cnt + 3'd1;
        if (sec == SEC_HEADER && u == 16'd0) pk_sof <= 1'b1;
        if (sec == SEC_TRAILER && sec_end)   pk_last <= 1'b1;
      end

      unique case (tstate)
        T_IDLE: begin
          if (start) begin
            tstate     <= T_EXTRACT;
            mode_q     <= mode;
            train_id_q <= train_id;
            data_id_q  <= data_id;
            link_id_q  <= link_id;
          end
        end
        T_EXTRACT: begin
          if (ex_done) begin
            tstate <= T_UNITS;
            sec    <= SEC_HEADER;
            u <= '0; e <= '0; k <= '0; uph <= 1'b0;
          end
        end
        T_UNITS: begin
          if (!uph) begin
            // an empty section (no images) is skipped
            if (sec_total == 16'd0) sec <= next_sec(sec);
            else                    uph <= 1'b1;
          end else if (unit_fire) begin
            uph <= 1'b0;
            u   <= u + 16'd1;
            if (k == upe_m1) begin
              k <= '0;
              e <= e + 16'd1;
            end else begin
              k <= k + 2'd1;
            end
            if (sec_end) begin
              u <= '0; e <= '0; k <= '0;
              sec <= next_sec(sec);
              // before the images and after the trailer: drain the packer
              if (sec == SEC_HEADER || sec == SEC_TRAILER) tstate <= T_DRAIN;
            end
          end
        end
        T_DRAIN: begin
          // let the packer send its last word before images or the end
          if (pk_cnt == 3'd0 || pk_fire) begin
            if (sec == SEC_IMAGES) begin
              if (n_img == 16'd0) begin
                sec    <= SEC_CELL;
                tstate <= T_UNITS;
              end else begin
                tstate <= T_IMG_FETCH;
              end
            end else begin
              tstate <= T_IDLE;
              done   <= 1'b1;
            end
          end
        end
        T_IMG_FETCH: begin
          // desc RAM output for image e is valid after this clock
          tstate <= T_IMG_REQ;
        end
        T_IMG_REQ: begin
          if (mem_req_valid && mem_req_ready) begin
            tstate <= T_IMG_DATA;
            wcnt   <= '0;
          end
        end
        T_IMG_DATA: begin
          if (mem_data_valid && mem_data_ready) begin
            if (wcnt == ($bits(wcnt))'(IMAGE_WORDS - 1)) begin
              if (e == n_img - 16'd1) begin
                e      <= '0;
                sec    <= SEC_CELL;
                tstate <= T_UNITS;
                uph    <= 1'b0;
              end else begin
                e      <= e + 16'd1;
                tstate <= T_IMG_FETCH;
              end
            end else begin
              wcnt <= wcnt + 1'b1;
            end
          end
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

endmodule
