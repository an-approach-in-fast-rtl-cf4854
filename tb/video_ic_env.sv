// video_ic_env: end-to-end test environment for video_ic_top.
//
// Drives a stream of interlaced fields into the design (alternating parity,
// one pixel every second clock), connects two field memory models, and
// checks every active pixel of the 100 Hz output against a reference model
// computed here from the generated fields:
//   stored field S[k] = noise-reduced input field k, the reduction comparing
//     each pixel with S[k-2] and with its 3x3 neighbourhood;
//   output period p (after the p-th input VS) shows field k = p-1 twice:
//     first the interpolated opposite-parity field
//       (median(above, below, S[k-1]) + (above + below)/2) / 2,
//     then S[k] itself, rows mapped by the vertical zoom of that period.
// The picture is a smooth ramp that moves from field to field, with isolated
// spikes that the noise reduction must replace. Zoom is off for the first
// periods and switched on for the last two.
// Counts, and fails if any never happened: replaced pixels, both output
// parities, zoomed and unzoomed output fields, row clamping at the top and
// bottom of an interpolated field, and a zoom mode switch. Also checks that
// each output field has exactly H_ACTIVE x V_ACTIVE active pixels and that
// two output fields come per input field.
// FULL = 1 instantiates the design with its default parameters.
module video_ic_env #(
  parameter bit          FULL        = 1'b0,
  parameter int unsigned H_ACTIVE    = 720,
  parameter int unsigned H_TOTAL     = 864,
  parameter int unsigned V_ACTIVE    = 288,
  parameter int unsigned V_TOTAL     = 312,
  parameter int unsigned OUT_V_START = 20,
  parameter int unsigned IN_VSTART   = 22,
  parameter int unsigned NF          = 4,
  parameter int unsigned Z_FIRST     = 36,
  parameter int unsigned Z_STEP      = 192
) ();
  import video_pkg::*;

  localparam int unsigned AW = $clog2(H_ACTIVE * V_ACTIVE);
  localparam int unsigned RW = $clog2(V_ACTIVE + 1);
  localparam int unsigned NPIX = H_ACTIVE * V_ACTIVE;
  localparam int unsigned TH = 40;
  localparam longint PERIOD_CLK = 2 * longint'(H_TOTAL) * V_TOTAL;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_en, av_i, vs_i, interlc_i;
  pix_t          yi, ci;
  logic          nr_en, zoom_en;
  pix_t          nr_th;
  logic [RW-1:0] zoom_first;
  logic [8:0]    zoom_step;
  pix_t          yo, co;
  logic          av_o, vs_o, interlc_o, nr_fwd;
  logic [1:0]    fm_we;
  logic [AW-1:0] fm_waddr;
  fm_word_t      fm_wdata;
  logic [AW-1:0] fm_raddr [2][2];
  fm_word_t      fm_rdata [2][2];

  if (FULL) begin : g_full
    video_ic_top u_dut (.*);
  end else begin : g_small
    video_ic_top #(.H_ACTIVE(H_ACTIVE), .H_TOTAL(H_TOTAL), .V_ACTIVE(V_ACTIVE),
                   .V_TOTAL(V_TOTAL), .OUT_V_START(OUT_V_START)) u_dut (.*);
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    field_mem_model #(.DEPTH(NPIX)) u_mem (
      .clk, .we(fm_we[b]), .waddr(fm_waddr), .wdata(fm_wdata),
      .raddr(fm_raddr[b]), .rdata(fm_rdata[b])
    );
  end

  // ---------------- reference model ----------------
  int unsigned checks = 0, failures = 0;
  byte unsigned sy [NF][NPIX];   // stored luminance S[k]
  byte unsigned sc [NF][NPIX];   // stored chroma nibble
  int unsigned  ref_fwd = 0;

  function automatic byte unsigned pixel(int k, int r, int x);
    int unsigned v = (r * 7 + x * 3 + k * 11) & 255;
    if ((r * 13 + x * 7 + k) % 37 == 0) v = v ^ 32'h80;
    return byte'(v);
  endfunction

  function automatic byte unsigned ad(byte unsigned a, byte unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic byte unsigned med3(byte unsigned a, byte unsigned b, byte unsigned c);
    byte unsigned t [3] = '{a, b, c};
    t.sort();
    return t[1];
  endfunction

  task automatic build_reference();
    for (int k = 0; k < int'(NF); k++)
      for (int r = 0; r < int'(V_ACTIVE); r++)
        for (int x = 0; x < int'(H_ACTIVE); x++) begin
          byte unsigned c = pixel(k, r, x);
          byte unsigned p = (k >= 2) ? sy[k-2][r*H_ACTIVE+x] : 8'd0;
          bit iso = 1'b1;
          bit rep;
          if (r == 0 || r == int'(V_ACTIVE) - 1 || x == 0 || x == int'(H_ACTIVE) - 1) iso = 1'b0;
          else
            for (int dr = -1; dr <= 1; dr++)
              for (int dx = -1; dx <= 1; dx++)
                if ((dr != 0 || dx != 0) && ad(c, pixel(k, r + dr, x + dx)) <= TH) iso = 1'b0;
          rep = iso && (ad(c, p) > TH);
          if (rep) ref_fwd++;
          sy[k][r*H_ACTIVE+x] = rep ? p : c;
          sc[k][r*H_ACTIVE+x] = byte'((r + x + k) & 15);
        end
  endtask

  function automatic bit zoom_on(int period);
    return period >= int'(NF) - 1;
  endfunction

  function automatic int src_row(int period, int j);
    int s;
    if (!zoom_on(period)) return j;
    s = Z_FIRST + ((j * Z_STEP) >> 8);
    return (s > int'(V_ACTIVE) - 1) ? int'(V_ACTIVE) - 1 : s;
  endfunction

  // ---------------- stimulus ----------------
  int period_in = -1;   // number of input VS sent, minus one

  initial begin
    in_en = 0; av_i = 0; vs_i = 0; interlc_i = 0; yi = 0; ci = 0;
    nr_en = 1; nr_th = pix_t'(TH);
    zoom_en = 0; zoom_first = RW'(Z_FIRST); zoom_step = 9'(Z_STEP);
    build_reference();
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (4) @(posedge clk);
    // NF fields, then one blank field so the last stored field is shown.
    for (int k = 0; k <= int'(NF); k++) begin
      for (int line = 0; line < int'(V_TOTAL); line++) begin
        for (int h = 0; h < int'(H_TOTAL); h++) begin
          automatic int r = line - int'(IN_VSTART);
          automatic bit act = (k < int'(NF)) && r >= 0 && r < int'(V_ACTIVE) && h < int'(H_ACTIVE);
          if (line == 0 && h == 0) begin
            period_in++;
            zoom_en = zoom_on(period_in);
          end
          @(posedge clk);
          in_en     <= 1'b1;
          vs_i      <= (line == 0);
          interlc_i <= k[0];
          av_i      <= act;
          yi        <= act ? pixel(k, r, h) : 8'($urandom);
          ci        <= act ? {4'((r + h + k) & 15), 4'($urandom)} : 8'($urandom);
          @(posedge clk);
          in_en     <= 1'b0;
        end
      end
    end
    repeat (10) @(posedge clk);
    finish_test();
  end

  // ---------------- output checker ----------------
  int  ofield = -1;           // output fields started (vs_o rises)
  int  orow = 0, ocol = 0, opix = 0;
  bit  vs_q = 0, av_q = 0;
  int unsigned n_par [2] = '{0, 0};
  int unsigned n_zoom = 0, n_nozoom = 0, n_clamp_top = 0, n_clamp_bot = 0;
  int unsigned n_dut_fwd = 0, n_fields_checked = 0, n_switch = 0;
  bit last_zoom = 0;

  always @(posedge clk) if (rst_n && nr_fwd) n_dut_fwd++;

  always @(posedge clk) if (rst_n) begin
    if (vs_o && !vs_q) begin
      if (ofield >= 2 && opix != int'(NPIX)) begin
        failures++;
        $display("FAIL output field %0d had %0d active pixels", ofield, opix);
      end
      if (ofield >= 2) checks++;
      ofield++;
      orow = 0; ocol = 0; opix = 0;
    end
    if (av_o) begin
      automatic int period = ofield / 2;
      automatic int ph = ofield % 2;
      automatic int k = period - 1;
      if (k >= 0 && k < int'(NF)) begin
        automatic int s = src_row(period, orow);
        automatic int par = k % 2;
        automatic byte unsigned ey, ec;
        automatic bit epar;
        if (ph == 0) begin
          automatic int ra = (par != 0) ? ((s == 0) ? 0 : s - 1) : s;
          automatic int rb = (par != 0) ? s : ((s == int'(V_ACTIVE) - 1) ? s : s + 1);
          automatic byte unsigned a = sy[k][ra*H_ACTIVE+ocol];
          automatic byte unsigned b = sy[k][rb*H_ACTIVE+ocol];
          automatic byte unsigned t = (k >= 1) ? sy[k-1][s*H_ACTIVE+ocol] : 8'd0;
          automatic int lp = (int'(a) + int'(b) + 1) / 2;
          ey = byte'((med3(a, b, t) + lp + 1) / 2);
          ec = sc[k][ra*H_ACTIVE+ocol];
          epar = !par[0];
          if (ocol == 0 && par == 1 && s == 0) n_clamp_top++;
          if (ocol == 0 && par == 0 && s == int'(V_ACTIVE) - 1) n_clamp_bot++;
        end else begin
          ey = sy[k][s*H_ACTIVE+ocol];
          ec = sc[k][s*H_ACTIVE+ocol];
          epar = par[0];
        end
        checks++;
        if (yo !== ey || co !== {ec[3:0], 4'h0} || interlc_o !== epar) begin
          failures++;
          if (failures < 10)
            $display("FAIL period %0d phase %0d row %0d col %0d: yo=%0d exp %0d co=%0h exp %0h il=%0d exp %0d",
                     period, ph, orow, ocol, yo, ey, co, {ec[3:0], 4'h0}, interlc_o, epar);
        end
        if (orow == 0 && ocol == 0) begin
          n_fields_checked++;
          n_par[epar]++;
          if (zoom_on(period)) n_zoom++; else n_nozoom++;
          if (n_fields_checked > 1 && zoom_on(period) != last_zoom) n_switch++;
          last_zoom = zoom_on(period);
        end
      end
      opix++;
      ocol++;
    end
    if (!av_o && av_q) begin
      orow++;
      ocol = 0;
    end
    vs_q = vs_o;
    av_q = av_o;
  end

  task automatic need(string what, int unsigned n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  task automatic finish_test();
    need("nr pixel replaced", n_dut_fwd);
    need("output parity 0 field", n_par[0]);
    need("output parity 1 field", n_par[1]);
    need("zoomed output field", n_zoom);
    need("unzoomed output field", n_nozoom);
    need("zoom mode switch", n_switch);
    need("interp clamp at top row", n_clamp_top);
    need("interp clamp at bottom row", n_clamp_bot);
    checks++;
    if (n_dut_fwd != ref_fwd) begin
      failures++;
      $display("FAIL nr replacements %0d, expected %0d", n_dut_fwd, ref_fwd);
    end
    checks++;
    // Two output fields per input field.
    if (ofield != 2 * (int'(NF) + 1) - 1) begin
      failures++;
      $display("FAIL %0d output fields started, expected %0d", ofield + 1, 2 * (NF + 1));
    end
    checks++;
    if (n_fields_checked != 2 * NF) begin
      failures++;
      $display("FAIL %0d output fields checked, expected %0d", n_fields_checked, 2 * NF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat ((NF + 3) * PERIOD_CLK) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
