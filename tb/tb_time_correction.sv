// tb_time_correction: loads random coarse (per front-end, in images) and fine
// (per channel, signed TDC units) corrections, sends random hits and checks
// the corrected key, computed here in integer arithmetic as
// (image*2^14 + time - ctc*2^14 - t0) mod 2^24, and the two-cycle latency.
module tb_time_correction;
  import l0_pkg::*;
  logic clk = 0, reset = 1;
  logic ctc_we = 0, t0_we = 0;
  logic [FE_W-1:0] ctc_addr = '0;
  logic [IMG_W-1:0] ctc_data = '0;
  logic [DET_W-1:0] t0_addr = '0;
  logic signed [15:0] t0_data = '0;
  logic in_valid = 0;
  mapped_hit_t in_hit = '0;
  logic out_valid;
  hit_t out_hit;
  int checks = 0, failures = 0;
  int ctc_ref [256];
  int t0_ref [int];
  int dets [$];

  time_correction dut (.clk, .reset, .ctc_we, .ctc_addr, .ctc_data, .t0_we, .t0_addr, .t0_data,
                       .in_valid, .in_hit, .out_valid, .out_hit);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

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
    for (int f = 0; f < 256; f++) begin
      ctc_we = 1; ctc_addr = f[7:0]; ctc_data = IMG_W'($urandom_range(0, 5));
      ctc_ref[f] = int'(ctc_data);
      @(negedge clk);
    end
    ctc_we = 0;
    for (int i = 0; i < 200; i++) begin
      int d;
      d = $urandom_range(0, 65535);
      t0_we = 1; t0_addr = d[15:0]; t0_data = 16'($signed($urandom_range(0, 4000)) - 2000);
      t0_ref[d] = int'(t0_data);
      dets.push_back(d);
      @(negedge clk);
    end
    t0_we = 0;
    for (int i = 0; i < 500; i++) begin
      mapped_hit_t h;
      int d, k;
      d = dets[$urandom_range(0, dets.size() - 1)];
      h.image = IMG_W'($urandom); h.time_ = HT_W'($urandom); h.fe = FE_W'($urandom); h.det = d[15:0];
      k = (int'(h.image) * 16384 + int'(h.time_) - ctc_ref[h.fe] * 16384 - t0_ref[d]) & 32'hffffff;
      in_valid = 1; in_hit = h;
      @(negedge clk);
      in_valid = 0;
      check("not valid after one cycle", out_valid == 0);
      @(negedge clk);
      check("valid after two cycles", out_valid == 1);
      check($sformatf("corrected key %h exp %h", out_hit.key, k[23:0]), out_hit.key == k[23:0]);
      check("channel passes", out_hit.det == h.det);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
