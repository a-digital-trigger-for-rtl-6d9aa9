// tb_event_builder: sends a time-ordered hit stream with random gaps (equal
// times included) and checks, against a model of the gate
// T_first < T < T_first + 25, each hit's event number and relative time
// (one cycle after the hit), each event record (number, time, hit count,
// candidate = at least two hits), and that `close` ends the last event.
// Ends with a three-hit worked example whose event records are checked
// directly.
module tb_event_builder;
  import l0_pkg::*;
  localparam int TCUT = 25;
  logic clk = 0, reset = 1, in_valid = 0, in_keep = 0, close = 0;
  hit_t in_hit = '0;
  logic out_hit_valid, out_hit_keep, ev_valid, ev_candidate;
  logic [15:0] out_hit_event, ev_id;
  logic [KEY_W-1:0] out_hit_rel, ev_time;
  logic [DET_W-1:0] out_hit_det;
  logic [7:0] ev_nhits;
  int checks = 0, failures = 0;
  typedef struct { int ev; int rel; int det; int keep; } exp_hit_t;
  typedef struct { int id; int t; int n; } exp_ev_t;
  exp_hit_t eh [$];
  exp_ev_t ee [$];
  bit m_open = 0;
  int m_first = 0, m_n = 0, m_id = 0;
  int n_cand = 0, n_single = 0;
  int got_t [$], got_n [$];   // time and hit count of every event record

  event_builder #(.T_CUT(TCUT)) dut (.clk, .reset, .in_valid, .in_hit, .in_keep, .close,
    .out_hit_valid, .out_hit_event, .out_hit_rel, .out_hit_det, .out_hit_keep,
    .ev_valid, .ev_id, .ev_time, .ev_nhits, .ev_candidate);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s @%0t", what, $time); end
  endtask

  // Monitor: samples just after the clock edge.
  always @(posedge clk) #1 if (!reset) begin
    if (out_hit_valid) begin
      exp_hit_t e;
      if (eh.size() == 0) check("unexpected hit", 0);
      else begin
        e = eh.pop_front();
        check($sformatf("hit event %0d exp %0d", out_hit_event, e.ev), int'(out_hit_event) == e.ev);
        check($sformatf("hit rel %0d exp %0d", out_hit_rel, e.rel), int'(out_hit_rel) == e.rel);
        check("hit det and keep", int'(out_hit_det) == e.det && int'(out_hit_keep) == e.keep);
      end
    end
    if (ev_valid) begin
      exp_ev_t e;
      if (ee.size() == 0) check("unexpected event", 0);
      else begin
        e = ee.pop_front();
        check($sformatf("event id %0d exp %0d", ev_id, e.id), int'(ev_id) == e.id);
        check("event time", int'(ev_time) == e.t);
        check($sformatf("event hits %0d exp %0d", ev_nhits, e.n), int'(ev_nhits) == e.n);
        check("candidate flag", ev_candidate == (e.n >= 2));
        got_t.push_back(int'(ev_time)); got_n.push_back(int'(ev_nhits));
        if (e.n >= 2) n_cand++; else n_single++;
      end
    end
  end

  task automatic model_close();
    if (m_open) begin
      ee.push_back('{m_id, m_first, m_n});
      m_id++;
      m_open = 0;
    end
  endtask

  task automatic send(int t, int det, int keep);
    exp_hit_t e;
    if (m_open && t > m_first && t < m_first + TCUT) begin
      m_n++;
      e = '{m_id, t - m_first, det, keep};
    end else begin
      model_close();
      m_open = 1; m_first = t; m_n = 1;
      e = '{m_id, 0, det, keep};
    end
    eh.push_back(e);
    in_valid = 1; in_hit.key = KEY_W'(t); in_hit.det = DET_W'(det); in_keep = keep[0];
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (2) @(negedge clk);
    reset = 0;
    // Gate edges: +24 joins, +25 does not, equal time does not.
    send(100, 1, 0); send(124, 2, 1); send(125, 3, 0);
    send(125, 4, 0); send(149, 5, 0); send(150, 6, 0);
    t = 1000;
    for (int i = 0; i < 2000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      t += (r < 2) ? 0 : (r < 8) ? $urandom_range(1, 15) : $urandom_range(20, 60);
      send(t, i % 65536, int'($urandom_range(0, 1)));
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    close = 1; model_close(); @(negedge clk); close = 0;
    @(negedge clk); @(negedge clk);
    check("all hits compared", eh.size() == 0);
    check("all events compared", ee.size() == 0);
    check("candidates and single-hit events both seen", n_cand > 10 && n_single > 10);
    // Worked example: hits at image:time 10:50 (source 222), 10:100 and
    // 11:105 (source 111) are three single-hit events with times 10/50,
    // 10/100 and 11/105.
    got_t.delete(); got_n.delete();
    send((10 << 14) + 50, 222, 0); send((10 << 14) + 100, 111, 0); send((11 << 14) + 105, 111, 0);
    close = 1; model_close(); @(negedge clk); close = 0;
    @(negedge clk); @(negedge clk);
    check("example: three events", got_t.size() == 3);
    if (got_t.size() == 3)
      check("example: event times and hit counts",
            got_t[0] == (10 << 14) + 50 && got_t[1] == (10 << 14) + 100 && got_t[2] == (11 << 14) + 105
            && got_n[0] == 1 && got_n[1] == 1 && got_n[2] == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
