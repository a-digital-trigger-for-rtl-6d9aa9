// tb_sorting_array: checks the parallel sorter against a sorted-queue model.
// Fills all 128 cells at one write per cycle, checks that one more write
// without a read loses the largest element and flags overflow, drains the
// array checking ascending order and one-cycle read latency, then runs a
// random mix of writes, reads and simultaneous read+write, checking every
// read value and its neighbour mark against the model. Ends with a short
// hand-written sequence whose sorted order is checked directly.
module tb_sorting_array;
  localparam int NC = 128, N = 40, KW = 24, G = 25;
  logic clk = 0, reset = 1, write = 0, read = 0;
  logic [N-1:0] wdata = '0;
  logic rd_valid, rd_keep, full, empty, overflow;
  logic [N-1:0] rd_data, head;
  logic [NC-1:0] cell_state, keep_data;
  int checks = 0, failures = 0;
  logic [N-1:0] model [$];
  int got_keys [$];   // keys of all reads, in order
  logic [N-1:0] exp_q [$];
  logic         expk_q [$];
  logic [KW-1:0] last_key;
  logic          last_valid = 0;
  int overflows = 0;

  sorting_array #(.NUM_CELLS(NC), .N(N), .KEY_W(KW), .KEEP_GATE(G)) dut (
    .clk, .reset, .enable(1'b1), .write, .wdata, .read,
    .rd_valid, .rd_data, .rd_keep, .head, .cell_state, .keep_data, .full, .empty, .overflow);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s @%0t", what, $time); end
  endtask

  function automatic logic [N-1:0] rnd_el();
    return {KW'($urandom_range(0, 3000)), 16'($urandom)};
  endfunction

  // One cycle: apply w/r, update the model the way the sorter should.
  task automatic step(logic w, logic r, logic [N-1:0] d);
    logic [N-1:0] v;
    logic k;
    write = w; read = r; wdata = d;
    if (w) begin model.push_back(d); model.sort(); end
    if (w && !r && model.size() > NC) void'(model.pop_back());
    if (r && model.size() > 0) begin
      v = model.pop_front();
      k = (model.size() > 0 && (int'(model[0][N-1 -: KW]) - int'(v[N-1 -: KW])) <= G)
       || (last_valid && (int'(v[N-1 -: KW]) - int'(last_key)) <= G && (int'(last_key) - int'(v[N-1 -: KW])) <= G);
      last_valid = 1; last_key = v[N-1 -: KW];
      exp_q.push_back(v); expk_q.push_back(k);
    end
    @(negedge clk);
    write = 0; read = 0;
  endtask

  // Compare every read result one cycle after its read.
  // Monitor: samples just after the clock edge.
  always @(posedge clk) #1 begin
    if (!reset) begin
      if (overflow) overflows++;
      if (rd_valid) begin
        if (exp_q.size() == 0) check("unexpected read data", 0);
        else begin
          logic [N-1:0] e; logic ek;
          e = exp_q.pop_front(); ek = expk_q.pop_front();
          got_keys.push_back(int'(rd_data[N-1 -: KW]));
          check($sformatf("read value %h exp %h", rd_data, e), rd_data == e);
          check($sformatf("read neighbour mark got %0d exp %0d val %h", rd_keep, ek, rd_data), rd_keep == ek);
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    check("empty after reset", empty && cell_state == '0);
    // Fill at one element per cycle.
    for (int i = 0; i < NC; i++) begin
      step(1, 0, rnd_el());
      check("one write per cycle fills one cell", $countones(cell_state) == i + 1);
    end
    check("full", full);
    // One more write without a read: overflow, largest lost.
    step(1, 0, {KW'(0), 16'hbeef});
    @(negedge clk);
    check("overflow flagged", overflows == 1);
    check("smallest is the new element", head == {KW'(0), 16'hbeef});
    // Drain.
    while (!empty) step(0, 1, '0);
    @(negedge clk);
    check("drained all, nothing pending", exp_q.size() == 0);
    // Random mix.
    for (int i = 0; i < 4000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      if (model.size() >= NC) step(r < 5, 1, rnd_el());
      else if (r < 4) step(1, 0, rnd_el());
      else if (r < 7) step(0, 1, '0);
      else step(1, 1, rnd_el());
      check("occupancy matches model", $countones(cell_state) == model.size());
    end
    // Full array, one write and one read per cycle, values above and below
    // the stored ones.
    while (!full) step(1, 0, rnd_el());
    for (int i = 0; i < 500; i++) begin
      step(1, 1, {KW'($urandom_range(0, 6000)), 16'($urandom)});
      check("stays full under read+write", full && $countones(cell_state) == NC);
    end
    while (!empty) step(0, 1, '0);
    @(negedge clk); @(negedge clk);
    check("all reads compared", exp_q.size() == 0);
    check("no further overflow", overflows == 1);
    // Worked example: a short unsorted sequence written one per cycle, then
    // read out; the read stream must be the sequence in ascending order.
    begin
      automatic int seq [$] = '{8, 1, 5, 3, 12, 17, 19, 22, 7, 27, 14, 33, 56, 67, 101, 105, 103,
                      112, 117, 108, 119, 122, 107, 127, 114, 133, 156};
      int srt [$];
      srt = seq; srt.sort();
      got_keys.delete();
      foreach (seq[i]) step(1, 0, {KW'(seq[i]), 16'h0});
      while (!empty) step(0, 1, '0);
      @(negedge clk); @(negedge clk);
      check("example read count", got_keys.size() == srt.size());
      foreach (srt[i]) if (i < got_keys.size()) check($sformatf("example order %0d", i), got_keys[i] == srt[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
