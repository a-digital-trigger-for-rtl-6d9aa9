// tb_channel_map: loads random mapping entries, then looks up hits and checks
// the detector channel and the one-cycle latency against a copy of the table
// kept in the testbench.
module tb_channel_map;
  import l0_pkg::*;
  logic clk = 0, reset = 1;
  logic cfg_we = 0;
  logic [FE_W+CH_W-1:0] cfg_addr = '0;
  logic [DET_W-1:0] cfg_data = '0;
  logic in_valid = 0;
  raw_hit_t in_hit = '0;
  logic out_valid;
  mapped_hit_t out_hit;
  int checks = 0, failures = 0;
  logic [DET_W-1:0] ref_tab [int];
  int addrs [$];

  channel_map dut (.clk, .reset, .cfg_we, .cfg_addr, .cfg_data, .in_valid, .in_hit, .out_valid, .out_hit);

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
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(0, 2**(FE_W+CH_W) - 1);
      cfg_we = 1; cfg_addr = a[FE_W+CH_W-1:0]; cfg_data = DET_W'($urandom);
      ref_tab[a] = cfg_data;
      addrs.push_back(a);
      @(negedge clk);
    end
    cfg_we = 0;
    for (int i = 0; i < 500; i++) begin
      int a;
      raw_hit_t h;
      a = addrs[$urandom_range(0, addrs.size() - 1)];
      h.image = IMG_W'($urandom); h.time_ = HT_W'($urandom);
      {h.fe, h.ch} = a[FE_W+CH_W-1:0];
      in_valid = 1; in_hit = h;
      @(negedge clk);
      in_valid = 0;
      check("valid after one cycle", out_valid == 1);
      check("detector channel", out_hit.det == ref_tab[a]);
      check("image, time and front-end pass through",
            out_hit.image == h.image && out_hit.time_ == h.time_ && out_hit.fe == h.fe);
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        check("no valid without input", out_valid == 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
