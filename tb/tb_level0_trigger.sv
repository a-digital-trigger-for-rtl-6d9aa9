// tb_level0_trigger: end-to-end test of the Level0 trigger at its default
// size (64 links, 128 sorting cells, T_cut 25).
//
// The mapping, coarse (0 or 1 image per front-end) and fine (per channel,
// signed) correction tables are loaded first. Then three slices are sent,
// every link acting as one front-end:
//   slice 1: six images; in each, three particles at random times leave
//            hits on about a fifth of the links each, plus random noise hits
//            on about a third; fill words and additional-data words are mixed
//            in; links send the same image at about the same time, with idle
//            gaps; links with a coarse correction of one image send their
//            particle hits one image later;
//   slice 2: the same, and link 5 sends an illegal word in its third image;
//   slice 3: a burst of 60 hits per link, far more than the link FIFOs and
//            the sorter hold.
// For slices 1 and 2 a model computes every corrected time, sorts the hits,
// applies the gate T_first < T < T_first + 25, and the testbench checks every
// output hit (detector channel, event number, relative time) and every event
// record in order. For slice 3 it checks that every hit sent is either
// delivered or counted as dropped, and that the event records account for
// every delivered hit. Each mechanism (decode error, FIFO drop, link held at
// end of slice, forced early read of the sorter, slice flush, coincidence
// candidate and single-hit event, neighbour mark) must occur at least once.
module tb_level0_trigger;
  import l0_pkg::*;
  import tb_words_pkg::*;
  localparam int L = 64, TCUT = 25, GAP = 150;

  logic clk = 0, reset = 1;
  logic [L-1:0] link_valid = '0;
  logic [WORD_W-1:0] link_data [L];
  logic map_we = 0, ctc_we = 0, t0_we = 0;
  logic [FE_W+CH_W-1:0] map_addr = '0;
  logic [DET_W-1:0] map_data = '0, t0_addr = '0;
  logic [FE_W-1:0] ctc_addr = '0;
  logic [IMG_W-1:0] ctc_data = '0;
  logic signed [15:0] t0_data = '0;
  logic hit_valid, hit_keep, ev_valid, ev_candidate, slice_done;
  logic [15:0] hit_event, ev_id, fifo_dropped, early_releases;
  logic [KEY_W-1:0] hit_rel_time, ev_time;
  logic [DET_W-1:0] hit_det;
  logic [7:0] ev_nhits;
  logic [L-1:0] decode_error;

  level0_trigger dut (
    .clk, .reset, .link_valid, .link_data,
    .map_we, .map_addr, .map_data, .ctc_we, .ctc_addr, .ctc_data, .t0_we, .t0_addr, .t0_data,
    .hit_valid, .hit_event, .hit_rel_time, .hit_det, .hit_keep,
    .ev_valid, .ev_id, .ev_time, .ev_nhits, .ev_candidate,
    .decode_error, .slice_done, .fifo_dropped, .early_releases);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s @%0t", what, $time); end
  endtask

  // ---------------- reference tables ----------------
  function automatic int det_of(int fe, int ch);
    return ((fe * 128 + ch) * 37) & 32'hffff;
  endfunction
  function automatic int ctc_of(int fe);
    return fe % 2;
  endfunction
  function automatic int t0_of(int fe, int ch);
    int d;
    d = det_of(fe, ch);
    return (ctc_of(fe) == 0) ? (d % 41) - 20 : -(d % 21);
  endfunction

  // ---------------- link driver ----------------
  logic [31:0] q [L][$];
  int n_fill = 0, n_adata = 0;
  always @(negedge clk) begin
    for (int l = 0; l < L; l++) begin
      link_valid[l] <= 1'b0;
      if (q[l].size() > 0 && $urandom_range(0, 9) < 8) begin
        link_valid[l] <= 1'b1;
        link_data[l]  <= q[l].pop_front();
      end
    end
  end
  function automatic bit links_idle();
    for (int l = 0; l < L; l++) if (q[l].size() > 0) return 0;
    return 1;
  endfunction

  // ---------------- monitor ----------------
  typedef struct { int det; int ev; int rel; } ohit_t;
  typedef struct { int id; int t; int n; int cand; } oev_t;
  ohit_t got_h [$];
  oev_t  got_e [$];
  int n_slice_done = 0, n_err = 0, n_keep1 = 0, n_keep0 = 0, n_cand = 0, n_single = 0;
  int n_hold = 0;
  always @(posedge clk) #1 if (!reset) begin
    if (hit_valid) begin
      got_h.push_back('{int'(hit_det), int'(hit_event), int'(hit_rel_time)});
      if (hit_keep) n_keep1++; else n_keep0++;
    end
    if (ev_valid) begin
      got_e.push_back('{int'(ev_id), int'(ev_time), int'(ev_nhits), int'(ev_candidate)});
      if (ev_candidate) n_cand++; else n_single++;
    end
    if (slice_done) n_slice_done++;
    if (|decode_error) n_err++;
    if (|dut.u_merge.held && !(&dut.u_merge.held)) n_hold++;
  end

  // ---------------- model ----------------
  logic [39:0] exp_words [$];   // {key, det} of the slice's expected hits
  int m_evid = 0;
  int sent_hits = 0;

  task automatic add_hit(int l, int img, int ch, int t);
    int key;
    key = (img * 16384 + t - ctc_of(l) * 16384 - t0_of(l, ch)) & 32'hffffff;
    exp_words.push_back({24'(key), 16'(det_of(l, ch))});
  endtask

  // Compare the slice's outputs with the model, then clear both.
  task automatic compare_slice(int s);
    ohit_t eh [$];
    oev_t  ee [$];
    bit open = 0;
    int first = 0, n = 0;
    exp_words.sort();
    foreach (exp_words[i]) begin
      int key, det;
      key = int'(exp_words[i][39:16]); det = int'(exp_words[i][15:0]);
      if (open && key > first && key < first + TCUT) begin
        n++;
        eh.push_back('{det, m_evid, key - first});
      end else begin
        if (open) begin ee.push_back('{m_evid, first, n, int'(n >= 2)}); m_evid++; end
        open = 1; first = key; n = 1;
        eh.push_back('{det, m_evid, 0});
      end
    end
    if (open) begin ee.push_back('{m_evid, first, n, int'(n >= 2)}); m_evid++; end
    check($sformatf("slice %0d: hit count %0d exp %0d", s, got_h.size(), eh.size()), got_h.size() == eh.size());
    check($sformatf("slice %0d: event count %0d exp %0d", s, got_e.size(), ee.size()), got_e.size() == ee.size());
    foreach (eh[i]) if (i < got_h.size())
      check($sformatf("slice %0d hit %0d: det %0d/%0d ev %0d/%0d rel %0d/%0d", s, i,
                      got_h[i].det, eh[i].det, got_h[i].ev, eh[i].ev, got_h[i].rel, eh[i].rel),
            got_h[i] == eh[i]);
    foreach (ee[i]) if (i < got_e.size())
      check($sformatf("slice %0d event %0d", s, i), got_e[i] == ee[i]);
    exp_words.delete(); got_h.delete(); got_e.delete();
  endtask

  task automatic wait_slice_done(int n);
    while (n_slice_done < n) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  // One normal slice; err_link >= 0 sends an illegal word in its third image.
  task automatic normal_slice(int sn, int err_link);
    bit dead [L];
    int tp [16][3];
    int chs [$];
    int ts [$];
    for (int i = 0; i < 16; i++) for (int k = 0; k < 3; k++) tp[i][k] = $urandom_range(100, 16000);
    for (int l = 0; l < L; l++) begin
      dead[l] = 0;
      q[l].push_back(w_slice_num(sn));
      q[l].push_back(w_slice_time(sn * 100000));
    end
    for (int img = 4; img < 10; img++) begin
      for (int l = 0; l < L; l++) begin
        int nh;
        if (dead[l]) continue;
        if (l == err_link && img == 6) begin
          q[l].push_back(w_image(img));
          q[l].push_back(w_data(1, 1));       // a hit where a group header belongs
          dead[l] = 1;
          continue;
        end
        // Hits of this link in raw image img: random noise, plus the hits of
        // particles of true image img - ctc, placed so that after both
        // corrections they lie within 10 TDC units of the particle time.
        chs.delete(); ts.delete();
        if ($urandom_range(0, 9) < 3) begin
          chs.push_back($urandom_range(0, 7)); ts.push_back($urandom_range(0, 16383));
        end
        for (int k = 0; k < 3; k++) begin
          if (img - ctc_of(l) >= 4 && $urandom_range(0, 9) < 2) begin
            int ch;
            ch = $urandom_range(0, 7);
            chs.push_back(ch);
            ts.push_back(tp[img - ctc_of(l)][k] + t0_of(l, ch) + $urandom_range(0, 10));
          end
        end
        nh = chs.size();
        if (nh == 0) continue;
        q[l].push_back(w_image(img));
        q[l].push_back(w_group(l + 100, l % 32, l));
        for (int h = 0; h < nh; h++) begin
          q[l].push_back(w_data(chs[h], ts[h]));
          add_hit(l, img, chs[h], ts[h]);
          sent_hits++;
          if ($urandom_range(0, 5) == 0) begin q[l].push_back(w_fill()); n_fill++; end
        end
        // Additional data closes the group's data, as the state diagram allows.
        if ($urandom_range(0, 3) == 0) begin q[l].push_back(w_adata($urandom)); n_adata++; end
        q[l].push_back(w_gtrl(l));
      end
      while (!links_idle()) @(negedge clk);
      repeat (GAP) @(negedge clk);
    end
    for (int l = 0; l < L; l++) q[l].push_back(w_eos());
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent3, drop_before, nh3;
    for (int l = 0; l < L; l++) link_data[l] = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    // Load the tables.
    for (int fe = 0; fe < L; fe++) begin
      for (int ch = 0; ch < 8; ch++) begin
        map_we = 1; map_addr = 15'(fe * 128 + ch); map_data = 16'(det_of(fe, ch));
        t0_we = 1; t0_addr = 16'(det_of(fe, ch)); t0_data = 16'(t0_of(fe, ch));
        ctc_we = (ch == 0); ctc_addr = 8'(fe); ctc_data = 10'(ctc_of(fe));
        @(negedge clk);
      end
    end
    map_we = 0; t0_we = 0; ctc_we = 0;

    normal_slice(1, -1);
    wait_slice_done(1);
    compare_slice(1);
    check("no drops in a normal slice", fifo_dropped == 0);
    check("no early release in a normal slice", early_releases == 0);

    normal_slice(2, 5);
    wait_slice_done(2);
    compare_slice(2);
    check("decode error seen", n_err == 1);

    // Slice 3: burst.
    sent3 = 0; drop_before = int'(fifo_dropped);
    for (int l = 0; l < L; l++) begin
      q[l].push_back(w_slice_num(3));
      q[l].push_back(w_slice_time(300000));
      for (int img = 4; img < 6; img++) begin
        q[l].push_back(w_image(img));
        q[l].push_back(w_group(l, 0, l));
        for (int h = 0; h < 30; h++) begin
          q[l].push_back(w_data($urandom_range(0, 7), $urandom_range(0, 16383)));
          sent3++;
        end
        q[l].push_back(w_gtrl(0));
      end
      q[l].push_back(w_eos());
    end
    wait_slice_done(3);
    nh3 = 0;
    foreach (got_e[i]) nh3 += got_e[i].n;
    check($sformatf("burst: delivered %0d + dropped %0d = sent %0d", got_h.size(),
                    int'(fifo_dropped) - drop_before, sent3),
          got_h.size() + int'(fifo_dropped) - drop_before == sent3);
    check("burst: events account for every hit", nh3 == got_h.size());
    check("burst: event numbers continue", got_e.size() > 0 && got_e[0].id == m_evid);

    // Mechanisms.
    check("mechanism: slice flush (3)", n_slice_done == 3);
    check("mechanism: FIFO drop", fifo_dropped > 0);
    check("mechanism: forced early read of the sorter", early_releases > 0);
    check("mechanism: link held at end of slice", n_hold > 0);
    check("mechanism: coincidence candidates", n_cand > 0);
    check("mechanism: single-hit events", n_single > 0);
    check("mechanism: neighbour mark set and clear", n_keep1 > 0 && n_keep0 > 0);
    check("mechanism: additional data and fill words", n_adata > 0 && n_fill > 0);
    $display("sent %0d hits in slices 1-2; burst %0d hits, %0d dropped, %0d early reads; %0d candidates, %0d single-hit events",
             sent_hits, sent3, int'(fifo_dropped) - drop_before, early_releases, n_cand, n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
