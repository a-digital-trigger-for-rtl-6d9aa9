// tb_link_merger: four links, FIFOs of 4 entries. Checks that every hit of a
// slice comes out exactly once and in per-link order, that no hit of the next
// slice passes before release_slice, that slice_end pulses once per slice,
// that the arbiter serves waiting links round-robin at one hit per cycle, and
// that a hit arriving when its FIFO has one free entry left (kept for the
// end-of-slice marker) is dropped and counted.
module tb_link_merger;
  import l0_pkg::*;
  localparam int L = 4, D = 4;
  logic clk = 0, reset = 1, release_slice = 0;
  logic [L-1:0] in_valid = '0, in_eos = '0;
  raw_hit_t in_hit [L];
  logic out_valid, slice_end;
  raw_hit_t out_hit;
  logic [15:0] dropped;
  int checks = 0, failures = 0;
  int sent [L][$];           // per link: sequence numbers sent, slice in image field
  int n_out [2];
  int n_slice_end = 0;
  int released = 0;
  int last_link = -1, rr_ok = 0, rr_seen = 0;

  link_merger #(.NUM_LINKS(L), .FIFO_DEPTH(D)) dut (.clk, .reset, .in_valid, .in_hit, .in_eos,
    .release_slice, .out_valid, .out_hit, .slice_end, .dropped);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s @%0t", what, $time); end
  endtask

  function automatic raw_hit_t mk(int link, int slice, int seq);
    raw_hit_t h;
    h.image = IMG_W'(slice); h.time_ = HT_W'(seq); h.fe = FE_W'(link); h.ch = '0;
    return h;
  endfunction

  // Monitor: samples just after the clock edge, when registered outputs have settled.
  always @(posedge clk) #1 if (!reset) begin
    if (slice_end) n_slice_end++;
    if (out_valid) begin
      int l, s, q;
      l = int'(out_hit.fe); s = int'(out_hit.image); q = int'(out_hit.time_);
      check("slice 2 hit only after release", s == 1 || released > 0);
      if (sent[l].size() == 0) check("unexpected hit", 0);
      else check($sformatf("per-link order link %0d", l), sent[l].pop_front() == s * 1000 + q);
      if (s >= 1 && s <= 2) n_out[s-1]++;
      if (last_link >= 0) begin
        rr_seen++;
        if (l == (last_link + 1) % L) rr_ok++;
      end
      last_link = l;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) in_hit[l] = '0;
    repeat (2) @(negedge clk);
    reset = 0;
    // Slice 1: every link sends 3 hits at once, in parallel: the arbiter must
    // interleave them one per cycle, round robin.
    for (int q = 0; q < 3; q++) begin
      for (int l = 0; l < L; l++) begin
        in_valid[l] = 1; in_hit[l] = mk(l, 1, q); sent[l].push_back(1000 + q);
      end
      @(negedge clk);
    end
    in_valid = '0;
    repeat (20) @(negedge clk);
    check("slice 1 hits all out", n_out[0] == 3 * L);
    check("round robin while all links wait", rr_ok == rr_seen && rr_seen == 3 * L - 1);
    // Links 0..2 end the slice and go on into slice 2; link 3 is late.
    for (int l = 0; l < 3; l++) in_eos[l] = 1;
    @(negedge clk);
    in_eos = '0;
    for (int l = 0; l < 3; l++) begin
      in_valid[l] = 1; in_hit[l] = mk(l, 2, 0); sent[l].push_back(2000);
    end
    @(negedge clk);
    in_valid = '0;
    in_valid[3] = 1; in_hit[3] = mk(3, 1, 7); sent[3].push_back(1007);
    @(negedge clk);
    in_valid = '0;
    repeat (10) @(negedge clk);
    check("late link's slice 1 hit out", n_out[0] == 3 * L + 1);
    check("no slice end before last link", n_slice_end == 0);
    in_eos[3] = 1;
    @(negedge clk);
    in_eos = '0;
    repeat (5) @(negedge clk);
    check("slice end once", n_slice_end == 1);
    check("slice 2 held", n_out[1] == 0);
    // Link 0 floods while held: its FIFO (4) holds 1 + 2 more hits, one entry
    // stays free for a marker, the rest drop.
    for (int q = 1; q < 7; q++) begin
      in_valid[0] = 1; in_hit[0] = mk(0, 2, q);
      if (q <= D - 2) sent[0].push_back(2000 + q);
      @(negedge clk);
    end
    in_valid = '0;
    check("dropped hits counted", dropped == 16'(7 - (D - 1)));
    release_slice = 1; released = 1;
    @(negedge clk);
    release_slice = 0;
    repeat (20) @(negedge clk);
    check("slice 2 hits out after release", n_out[1] == 3 + (D - 2));
    check("slice end not repeated", n_slice_end == 1);
    for (int l = 0; l < L; l++) check("nothing left", sent[l].size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
