// xtdf_ref_pkg: reference model of one train in XTDF train-builder format,
// built byte by byte from the format description and packed into 64-bit
// words (first byte in bits [63:56]). Used by the testbenches to predict the
// exact output stream of the train builder.
package xtdf_ref_pkg;
  typedef logic [63:0] word_q_t[$];

  class xtdf_train;
    byte unsigned b[$];

    function void put(longint unsigned v, int nbytes);
      for (int i = nbytes - 1; i >= 0; i--) b.push_back(byte'(v >> (8 * i)));
    endfunction

    function void pad(int align);
      while (b.size() % align != 0) b.push_back(8'h00);
    endfunction

    // mode: 0 single, 1 A/D interleaved, 2 A/D separated
    // pulses / cells: good bunches in pulse order; table: the bunch table
    function word_q_t build(int mode, longint unsigned train_id, longint unsigned data_id,
                            longint unsigned link_id, int pulses[$], int cells[$],
                            logic [15:0] table_q[$], int num_cells, int image_bytes);
      word_q_t w;
      int n_img;
      n_img = (mode == 0) ? pulses.size() : 2 * pulses.size();
      b.delete();
      // header
      put(64'h5854_4446_beef_face, 8);
      put(1, 4); put(0, 4);
      put(train_id, 8); put(data_id, 8); put(link_id, 8); put(n_img, 8);
      pad(64);
      // images
      for (int i = 0; i < n_img; i++) begin
        int p, c, d, bufn;
        p = (mode == 0) ? i : i / 2;
        d = (mode == 0) ? 0 : i % 2;
        c = cells[p];
        case (mode)
          1: bufn = 2 * c + d;
          2: bufn = c + d * num_cells;
          default: bufn = c;
        endcase
        for (int k = 0; k < image_bytes / 8; k++) put({16'(bufn), 16'hc0de, 32'(k)}, 8);
      end
      // descriptors
      for (int i = 0; i < n_img; i++) put(cells[(mode == 0) ? i : i / 2], 2);
      pad(32);
      for (int i = 0; i < n_img; i++) begin put(pulses[(mode == 0) ? i : i / 2], 2); put(0, 6); end
      pad(32);
      for (int i = 0; i < n_img; i++) put(0, 2);
      pad(32);
      for (int i = 0; i < n_img; i++) put(image_bytes, 4);
      pad(32);
      // detector specific: bunch table
      foreach (table_q[i]) put(table_q[i], 2);
      pad(32);
      // trailer
      put(0, 8); put(0, 8); put(0, 8);
      put(64'h5854_4446_dead_abcd, 8);
      for (int i = 0; i < b.size(); i += 8) begin
        logic [63:0] x;
        for (int j = 0; j < 8; j++) x[63 - 8 * j -: 8] = b[i + j];
        w.push_back(x);
      end
      return w;
    endfunction
  endclass
endpackage
