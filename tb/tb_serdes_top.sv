// tb_serdes_top: end-to-end test of the SerDes core and the hybrid test path.
//
// The serial output is looped back to the serial input, and one word clock
// (period 40 bit clocks) drives both the transmit and the receive side, as
// the PMA and the receive word clock would. Random 40-bit words are offered
// at every rising edge of the word clock. Once the dividers are aligned, the
// word offered at the word-clock edge first sampled at edge n must be
// published by the deserializer at edge n+124 (capture at n+24, plus
// 100 bit periods through serializer, line and deserializer), with rx_valid
// high exactly then.
//
// The test goes through these phases and counts each mechanism:
//   - free run after reset with sync disabled (dividers not aligned to the
//     word clock), then sync enabled: the dividers jump to the word clock's
//     phase (counted from tx/rx_par_clk_out periods that are not 40);
//   - steady transfer with sync enabled (words checked);
//   - sync disabled with a steady word clock: the dividers keep their phase
//     and transfer stays correct (words checked in free run);
//   - a word-clock phase step while sync is enabled: both sides realign and
//     transfer resumes;
//   - hybrid path frames (8 serial bits -> encoder -> 3 serial bits) run in
//     parallel on their own clock and are checked as in tb_hybrid_serdes.
// Words whose path overlaps a phase step or a change of sync_en are not
// compared. Every mechanism must occur at least once.
module tb_serdes_top;
  import serdes_pkg::*;
  localparam int LAT_WORD = 124;
  localparam int NEDGES   = 8000;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             tx_par_clk_in = 1'b0, tx_sync_en = 1'b0;
  logic [PAR_W-1:0] tx_data = '0;
  logic             tx_serial, tx_par_clk_out;
  divclk_t          tx_div_clk, rx_div_clk;
  logic             rx_par_clk_in, rx_sync_en, rx_serial;
  logic [PAR_W-1:0] rx_data;
  logic             rx_valid, rx_par_clk_out;
  logic             hyb_clk, hyb_rst_n, hyb_start = 1'b0, hyb_sin = 1'b0;
  logic             hyb_sout, hyb_sout_valid;

  int checks = 0, failures = 0;
  int n_words = 0, n_free_words = 0, n_jumps_tx = 0, n_jumps_rx = 0, n_frames = 0, n_hyb_bits = 0;

  // loopback and shared word clock / sync
  assign rx_serial     = tx_serial;
  assign rx_par_clk_in = tx_par_clk_in;
  assign rx_sync_en    = tx_sync_en;
  assign hyb_clk       = clk;
  assign hyb_rst_n     = rst_n;

  serdes_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NEDGES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PAR_W-1:0] offered[int];   // word per word-clock edge
  bit               sync_at[int];   // sync_en in force when offered
  int               disturb[$];     // edges of phase steps and sync_en changes
  logic [2:0]       hyb_res[int];

  function automatic bit quiet(int a, int b);
    foreach (disturb[i]) if (disturb[i] >= a && disturb[i] <= b) return 1'b0;
    return 1'b1;
  endfunction

  // count divider phase jumps from the /40 output clocks
  int last_tx_rise = -1, last_rx_rise = -1, edge_no = 0;
  logic tx_pc_q = 1'b0, rx_pc_q = 1'b0;
  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    tx_pc_q <= tx_par_clk_out;
    rx_pc_q <= rx_par_clk_out;
    if (tx_par_clk_out && !tx_pc_q) begin
      if (last_tx_rise >= 0 && edge_no - last_tx_rise != 40) n_jumps_tx++;
      last_tx_rise <= edge_no;
    end
    if (rx_par_clk_out && !rx_pc_q) begin
      if (last_rx_rise >= 0 && edge_no - last_rx_rise != 40) n_jumps_rx++;
      last_rx_rise <= edge_no;
    end
  end

  initial begin
    int e, pc, ed, hold, hpos;
    bit exp_v, hexp_v, hexp_b, hactive;
    logic [7:0] hw;
    logic [2:0] hr;
    e = 0; pc = 17; hold = 0; hpos = 0; hactive = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (e < NEDGES) begin
      ed = e - 1;   // outputs show the result of edge ed
      // ---- SerDes core ----
      if (ed > 0 && quiet(ed - LAT_WORD - 120, ed) && ed > 600) begin
        exp_v = offered.exists(ed - LAT_WORD);
        checks++;
        if (rx_valid !== exp_v) begin
          failures++;
          if (failures < 10) $display("edge %0d: rx_valid=%b expected %b", ed, rx_valid, exp_v);
        end
        if (exp_v) begin
          checks++;
          if (rx_data !== offered[ed - LAT_WORD]) begin
            failures++;
            if (failures < 10) $display("edge %0d: rx_data=%h expected %h", ed, rx_data, offered[ed - LAT_WORD]);
          end else if (sync_at[ed - LAT_WORD]) n_words++;
          else n_free_words++;
        end
      end
      // ---- hybrid path ----
      hexp_v = 1'b0; hexp_b = 1'b0;
      for (int j = 0; j < 3; j++)
        if (hyb_res.exists(ed - 8 - j)) begin
          hexp_v = 1'b1; hr = hyb_res[ed - 8 - j]; hexp_b = hr[j];
        end
      checks++;
      if (hyb_sout_valid !== hexp_v || (hexp_v && hyb_sout !== hexp_b)) begin
        failures++;
        if (failures < 10) $display("edge %0d: hyb_sout=%b/%b expected %b/%b", ed, hyb_sout, hyb_sout_valid, hexp_b, hexp_v);
      end else if (hexp_v) n_hyb_bits++;

      // ---- stimulus: sync enable and word-clock phase steps ----
      if (e == 300)  begin tx_sync_en = 1'b1; disturb.push_back(e); end
      if (e == 3000) begin tx_sync_en = 1'b0; disturb.push_back(e); end
      if (e == 5000) begin tx_sync_en = 1'b1; disturb.push_back(e); end
      if (e == 6000) begin hold = 13; disturb.push_back(e); end
      tx_par_clk_in = pc < 20;
      if (pc == 0 && hold == 0) begin
        tx_data = {$urandom, $urandom};
        offered[e] = tx_data;
        sync_at[e] = tx_sync_en;
      end
      if (hold > 0 && pc == 25) hold--;   // stretch the low phase once
      else pc = (pc + 1) % 40;
      // ---- stimulus: hybrid frames ----
      hyb_start = 1'b0;
      if (!hactive && e < NEDGES - 100 && $urandom_range(0, 2) != 0) begin
        hactive = 1; hpos = 0;
        hw = ($urandom_range(0, 3) != 0) ? 8'(1) << $urandom_range(0, 7) : 8'($urandom);
        hr = '0;
        for (int k = 0; k < 8; k++) if (hw[k]) hr |= 3'(k);
      end
      if (hactive) begin
        if (hpos == 0) begin hyb_start = 1'b1; hyb_res[e] = hr; n_frames++; end
        hyb_sin = hw[hpos];
        hpos++;
        if (hpos == 8) hactive = 0;
      end else begin
        hyb_sin = 1'($urandom);
      end
      @(posedge clk);
      e++;
      @(negedge clk);
    end
    checks += 5;
    if (n_words < 50)     begin failures++; $display("too few words with sync enabled"); end
    if (n_free_words < 20) begin failures++; $display("too few words in free run"); end
    if (n_jumps_tx < 2 || n_jumps_rx < 2) begin failures++; $display("too few divider realignments"); end
    if (n_frames < 100)   begin failures++; $display("too few hybrid frames"); end
    if (n_hyb_bits < 300) begin failures++; $display("too few hybrid result bits"); end
    $display("words (sync on)=%0d words (free run)=%0d realignments tx=%0d rx=%0d hybrid frames=%0d result bits=%0d",
             n_words, n_free_words, n_jumps_tx, n_jumps_rx, n_frames, n_hyb_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
