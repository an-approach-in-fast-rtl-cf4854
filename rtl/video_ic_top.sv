// video_ic_top: scan-rate-conversion IC for 50 Hz interlaced 4:1:1 video.
//
// The input is a 50 Hz interlaced stream (Y, C, AV, VS, INTERLC). The output
// carries twice as many fields per second: for every received field n, the
// 100 Hz output shows first a field of the opposite parity interpolated from
// field n and its predecessor, then field n itself. Noise reduction is applied
// on the way into field storage, and the output can be stretched vertically
// for letterboxed (movie-mode) material.
//
// Write path, one pixel per enabled cycle (in_en):
//   input -> 3 x 3 window on the current field (st_window with one field
//   stream) -> one more pixel stage, during which the co-sited pixel of the
//   previous same-parity picture is read from the bank about to be
//   overwritten -> nr_filter -> written back to the same address of that
//   bank. Banks alternate every field, so the other bank always holds the
//   previous field.
// Read path, one pixel per clock:
//   out_timing raster -> vzoom row mapping -> read addresses -> first output
//   field: deint_interp of the rows above and below (bank of field n) and the
//   co-sited pixel of field n-1 (bank being rewritten, read ahead of the
//   writes); second output field: field n as stored.
//
// Field memories are external (two banks; one write port shared by both with
// a per-bank enable, two synchronous read ports per bank returning data one
// clock after the address). Port 1 of the bank being written is used by the
// write path for the read-before-write of the previous same-parity picture.
//
// Clocking: one clock. in_en marks input pixels and must not be high in two
// consecutive clocks; for 100 Hz output with the full line length, in_en is
// high every second clock, i.e. the core clock is twice the input pixel rate.
// Output latency: yo/co/av_o/vs_o/interlc_o are registered and follow the
// raster by three clocks. The input's first active line must come no earlier
// than (OUT_V_START - 1) / 2 lines after VS, so reads of the rewritten bank
// stay ahead of the writes.
//
// Chroma: only the 4-bit 4:1:1 chroma nibble on C[7:4] is stored; filters act
// on luminance. Chroma follows the luminance position (interpolated lines take
// the chroma of the row used as "above"), and co carries the nibble on [7:4].
// The document names the functions (noise reduction, missing-field
// interpolation, 100 Hz doubling, vertical expansion); the memory organisation,
// field order and all handshakes here are this design's own.
module video_ic_top
  import video_pkg::*;
#(
  parameter int unsigned H_ACTIVE    = H_ACTIVE_DEF,
  parameter int unsigned H_TOTAL     = H_TOTAL_DEF,
  parameter int unsigned V_ACTIVE    = V_ACTIVE_DEF,
  parameter int unsigned V_TOTAL     = V_TOTAL_DEF,
  parameter int unsigned OUT_V_START = 20,
  localparam int unsigned AW = $clog2(H_ACTIVE * V_ACTIVE),
  localparam int unsigned RW = $clog2(V_ACTIVE + 1),
  localparam int unsigned CW = $clog2(H_ACTIVE + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // input stream (front end)
  input  logic          in_en,
  input  pix_t          yi,
  input  pix_t          ci,
  input  logic          av_i,
  input  logic          vs_i,
  input  logic          interlc_i,
  // configuration
  input  logic          nr_en,
  input  pix_t          nr_th,
  input  logic          zoom_en,
  input  logic [RW-1:0] zoom_first,
  input  logic [8:0]    zoom_step,
  // 100 Hz output stream (back end)
  output pix_t          yo,
  output pix_t          co,
  output logic          av_o,
  output logic          vs_o,
  output logic          interlc_o,
  // status
  output logic          nr_fwd,        // one pulse per pixel replaced by NR
  // external field memories, two banks
  output logic [1:0]    fm_we,
  output logic [AW-1:0] fm_waddr,
  output fm_word_t      fm_wdata,
  output logic [AW-1:0] fm_raddr [2][2],
  input  fm_word_t      fm_rdata [2][2]
);

  // ------------------------------------------------------------------
  // Input decoding and bank roles
  // ------------------------------------------------------------------
  logic          sof;
  logic [RW-1:0] in_row_unused;
  logic [CW-1:0] in_col_unused;
  logic          in_par_unused;

  in_timing #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_in_timing (
    .clk, .rst_n, .en(in_en), .av(av_i), .vs(vs_i), .interlc(interlc_i),
    .sof, .row(in_row_unused), .col(in_col_unused), .parity(in_par_unused)
  );

  logic          wbank;      // bank being written (holds field n-2 until overwritten)
  logic          par_w;      // parity of the field being written
  logic          par_y;      // parity of the field in the other bank
  logic          sync_out;
  logic          zen_l;
  logic [RW-1:0] zfirst_l;
  logic [8:0]    zstep_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank    <= 1'b0;
      par_w    <= 1'b0;
      par_y    <= 1'b1;
      sync_out <= 1'b0;
      zen_l    <= 1'b0;
      zfirst_l <= '0;
      zstep_l  <= 9'd256;
    end else begin
      sync_out <= sof;
      if (sof) begin
        wbank    <= ~wbank;
        par_y    <= par_w;
        par_w    <= interlc_i;
        zen_l    <= zoom_en;
        zfirst_l <= zoom_first;
        zstep_l  <= zoom_step;
      end
    end
  end

  // ------------------------------------------------------------------
  // Write path: stage A registers the input pixel
  // ------------------------------------------------------------------
  pix_t       y_a;
  logic [3:0] c_a;
  logic       av_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_a  <= '0;
      c_a  <= '0;
      av_a <= 1'b0;
    end else if (in_en) begin
      y_a  <= av_i ? yi : '0;
      c_a  <= av_i ? ci[7:4] : '0;
      av_a <= av_i;
    end
  end

  // 3 x 3 window on the current field (one field stream).
  pix_t st_in  [1];
  pix_t st_win [1][3][3];
  assign st_in[0] = y_a;

  st_window #(.D(1), .H(3), .W(3), .LINE(H_TOTAL)) u_win (
    .clk, .rst_n, .en(in_en), .field_in(st_in), .win(st_win)
  );

  // Chroma and AV follow the window centre: one line plus one pixel.
  logic [4:0] aux_line;
  logic [3:0] c_c;
  logic       av_c;

  line_mem #(.WIDTH(5), .DEPTH(H_TOTAL)) u_aux_lm (
    .clk, .rst_n, .en(in_en), .in_data({c_a, av_a}), .out_data(aux_line)
  );

  // The line memory is not cleared, so its output means nothing until it has
  // been filled once after reset; until then no centre pixel is valid.
  localparam int unsigned WUW = $clog2(H_TOTAL + 2);
  logic [WUW-1:0] warm;
  logic           warm_done;
  assign warm_done = (warm == WUW'(H_TOTAL + 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c_c, av_c} <= '0;
      warm        <= '0;
    end else if (in_en) begin
      {c_c, av_c} <= warm_done ? aux_line : '0;
      if (!warm_done) warm <= warm + 1'b1;
    end
  end

  logic [RW-1:0] row_c;
  logic [CW-1:0] col_c;
  logic          sof_c_unused, par_c_unused;

  in_timing #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_centre_timing (
    .clk, .rst_n, .en(in_en), .av(av_c), .vs(vs_i), .interlc(1'b0),
    .sof(sof_c_unused), .row(row_c), .col(col_c), .parity(par_c_unused)
  );

  // Stage B holds the centre's window and address for one pixel while the
  // co-sited pixel of the previous same-parity picture is read from the bank
  // that is about to be overwritten. Its address goes out at the start of
  // stage B; the word is back one clock later, before the next in_en.
  pix_t          b_win [3][3];
  logic [3:0]    b_c;
  logic          b_av, b_border;
  logic [AW-1:0] b_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_win    <= '{default: '0};
      b_c      <= '0;
      b_av     <= 1'b0;
      b_border <= 1'b0;
      b_addr   <= '0;
    end else if (in_en) begin
      b_win    <= st_win[0];
      b_c      <= c_c;
      b_av     <= av_c;
      b_border <= (row_c == '0) || (row_c == RW'(V_ACTIVE - 1)) ||
                  (col_c == '0) || (col_c == CW'(H_ACTIVE - 1));
      b_addr   <= AW'(row_c) * AW'(H_ACTIVE) + AW'(col_c);
    end
  end

  logic fwd;
  pix_t nr_y;

  nr_filter u_nr (
    .en_nr(nr_en), .th(nr_th), .border(b_border),
    .cur(b_win), .prev(fm_rdata[wbank][1].y),
    .y_out(nr_y), .fwd
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fm_we    <= '0;
      fm_waddr <= '0;
      fm_wdata <= '0;
      nr_fwd   <= 1'b0;
    end else begin
      fm_we  <= '0;
      nr_fwd <= 1'b0;
      if (in_en && b_av) begin
        fm_we[wbank] <= 1'b1;
        fm_waddr     <= b_addr;
        fm_wdata     <= '{y: nr_y, c: b_c};
        nr_fwd       <= fwd;
      end
    end
  end

  // ------------------------------------------------------------------
  // Read path
  // ------------------------------------------------------------------
  localparam int unsigned HW = $clog2(H_TOTAL);

  logic          o_vs, o_av, o_phase;
  logic [RW-1:0] o_row, s_row, up_row, dn_row, a_row, b_row;
  logic [HW-1:0] o_col;

  out_timing #(.H_ACTIVE(H_ACTIVE), .H_TOTAL(H_TOTAL), .V_ACTIVE(V_ACTIVE),
               .V_TOTAL(V_TOTAL), .V_START(OUT_V_START)) u_out_timing (
    .clk, .rst_n, .sync(sync_out),
    .vs(o_vs), .av(o_av), .phase(o_phase), .row(o_row), .col(o_col)
  );

  vzoom #(.V_ACTIVE(V_ACTIVE)) u_vzoom (
    .zoom_en(zen_l), .first(zfirst_l), .step(zstep_l),
    .row_out(o_row), .row_src(s_row)
  );

  // Rows around the missing line s of the interpolated field. Field A (even
  // lines, parity 0) misses line 2s+1, between its rows s and s+1; field B
  // (odd lines) misses line 2s, between its rows s-1 and s. In both cases row
  // s of the other field lies on the missing line.
  assign up_row = (s_row == '0) ? '0 : s_row - 1'b1;
  assign dn_row = (s_row == RW'(V_ACTIVE - 1)) ? s_row : s_row + 1'b1;
  assign a_row  = (!o_phase && par_y) ? up_row : s_row;
  assign b_row  = par_y ? s_row : dn_row;

  logic [AW-1:0] ra_above, ra_below, ra_temp;
  typedef struct packed {
    logic av;
    logic vs;
    logic phase;
    logic par;
  } octl_t;
  octl_t c1, c2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra_above <= '0;
      ra_below <= '0;
      ra_temp  <= '0;
      c1       <= '0;
      c2       <= '0;
    end else begin
      ra_above <= AW'(a_row) * AW'(H_ACTIVE) + AW'(o_col);
      ra_below <= AW'(b_row) * AW'(H_ACTIVE) + AW'(o_col);
      ra_temp  <= AW'(s_row) * AW'(H_ACTIVE) + AW'(o_col);
      c1       <= '{av: o_av, vs: o_vs, phase: o_phase, par: o_phase ? par_y : ~par_y};
      c2       <= c1;
    end
  end

  // Bank roles: the bank not being written holds field n (rows above/below
  // and the second output field); the bank being written still holds field
  // n-1 where the reads get there ahead of the writes.
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      fm_raddr[b][0] = (b[0] == wbank) ? ra_temp : ra_above;
      fm_raddr[b][1] = (b[0] == wbank) ? b_addr  : ra_below;
    end
  end

  fm_word_t pa, pb, pt;
  pix_t     yi_interp;
  assign pa = fm_rdata[~wbank][0];
  assign pb = fm_rdata[~wbank][1];
  assign pt = fm_rdata[wbank][0];

  deint_interp u_interp (
    .above(pa.y), .below(pb.y), .prev(pt.y), .y_out(yi_interp)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yo        <= '0;
      co        <= '0;
      av_o      <= 1'b0;
      vs_o      <= 1'b0;
      interlc_o <= 1'b0;
    end else begin
      av_o      <= c2.av;
      vs_o      <= c2.vs;
      interlc_o <= c2.par;
      yo        <= !c2.av ? '0 : (c2.phase ? pa.y : yi_interp);
      co        <= !c2.av ? '0 : {pa.c, 4'b0000};
    end
  end

  // in_en must leave a gap for the read-before-write to return its data.
  a_in_en_gap: assert property (@(posedge clk) disable iff (!rst_n) in_en |=> !in_en);

endmodule
