// tb_hit_buffer: 16-cell buffer with a four-image window (NUM_IMAGES = 4;
// the default of three is run by the top-level testbench). Sends ten images
// of hits in shuffled order with some hits arriving two images late, then
// flushes. Checks that the output is in ascending time order, that a hit
// leaves only once three later images have started (unless the buffer was
// full), that nothing is lost or
// duplicated, that flush_done follows the last hit, and that a burst larger
// than the buffer forces early reads instead of losing hits.
module tb_hit_buffer;
  import l0_pkg::*;
  localparam int NC = 16, NI = 4;
  logic clk = 0, reset = 1, in_valid = 0, flush = 0;
  hit_t in_hit = '0;
  logic out_valid, out_keep, flush_done, flushing;
  hit_t out_hit;
  logic [15:0] early_releases;
  logic [NC-1:0] cell_state;
  int checks = 0, failures = 0;
  hit_t late [12][$];   // late hits, by the image in which they are sent
  logic [39:0] sent [$];
  logic [39:0] got [$];
  int cur_img = 0, n_flush_done = 0, n_out = 0;
  logic [KEY_W-1:0] last_key = '0;
  logic have_last = 0;
  logic in_flush = 0;

  hit_buffer #(.NUM_CELLS(NC), .NUM_IMAGES(NI)) dut (.clk, .reset, .in_valid, .in_hit, .flush, .out_valid, .out_hit,
    .out_keep, .flush_done, .flushing, .early_releases, .cell_state);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s @%0t", what, $time); end
  endtask

  function automatic hit_t mk(int img, int t, int det);
    hit_t h;
    h.key = {IMG_W'(img), HT_W'(t)}; h.det = DET_W'(det);
    return h;
  endfunction

  // Monitor: samples just after the clock edge, when registered outputs have settled.
  always @(posedge clk) #1 if (!reset) begin
    if (flush_done) begin
      n_flush_done++;
      have_last = 0;
    end
    if (out_valid) begin
      n_out++;
      got.push_back(out_hit);
      if (have_last && early_releases == 0) check($sformatf("ascending order %h after %h", out_hit.key, last_key), out_hit.key >= last_key);
      have_last = 1; last_key = out_hit.key;
      if (!in_flush && early_releases == 0)
        check($sformatf("released only NI-1 images back (img %0d cur %0d)", out_hit.key[23:14], cur_img),
              int'(out_hit.key[23:14]) + NI - 1 <= cur_img);
    end
  end

  task automatic send(hit_t h);
    in_valid = 1; in_hit = h; sent.push_back(h);
    if (int'(h.key[23:14]) > cur_img) cur_img = int'(h.key[23:14]);
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic bit same_multiset();
    sent.sort(); got.sort();
    if (sent.size() != got.size()) return 0;
    foreach (sent[i]) if (sent[i] != got[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int im = 0; im < 10; im++) begin
      hit_t these [$];
      these.delete();
      for (int k = 0; k < 3; k++) these.push_back(mk(im, $urandom_range(0, 16383), im * 10 + k));
      these.shuffle();
      // Late hits of image im-(NI-2) come mixed in.
      foreach (late[im][i]) these.insert($urandom_range(0, these.size()), late[im][i]);
      late[im + NI - 2].push_back(mk(im, $urandom_range(0, 16383), 500 + im * 10));
      foreach (these[i]) begin
        send(these[i]);
        if ($urandom_range(0, 2) == 0) @(negedge clk);
      end
    end
    for (int im = 10; im < 12; im++) foreach (late[im][i]) send(late[im][i]);
    repeat (3) @(negedge clk);
    check("older images already released", n_out > 0);
    check("no early release at this load", early_releases == 0);
    in_flush = 1; flush = 1; @(negedge clk); flush = 0;
    repeat (NC + 5) @(negedge clk);
    check("flush done once", n_flush_done == 1);
    check("buffer empty after flush", cell_state == '0);
    check("every hit out exactly once", same_multiset());
    // Burst of 40 hits inside one image into 16 cells: forced reads.
    in_flush = 0; have_last = 0; cur_img = 0; sent.delete(); got.delete();
    for (int k = 0; k < 40; k++) send(mk(0, $urandom_range(0, 16383), k));
    check($sformatf("early releases counted %0d", early_releases), early_releases == 16'(40 - NC));
    in_flush = 1; flush = 1; @(negedge clk); flush = 0;
    repeat (NC + 5) @(negedge clk);
    check("flush done twice", n_flush_done == 2);
    check($sformatf("burst: nothing lost %0d %0d", sent.size(), got.size()), same_multiset());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
