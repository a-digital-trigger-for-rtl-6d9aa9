// tb_sorting_cell: checks one sorting cell against the sorter's rule set.
// Drives the neighbour signals by hand and checks claim, keep, kick-out,
// forced take-over from the cell above, parallel pull from below, the
// neighbour mark and the enable freeze, each one cycle after the stimulus;
// then 3000 random cycles against a direct model of the rules.
module tb_sorting_cell;
  localparam int N = 40, KW = 24, G = 25;
  logic clk = 0, reset = 1, enable = 1, write = 0;
  logic [N-1:0] din = '0, prev_d = '0, next_d = '0, next_wd = '0;
  logic prev_pushed = 0, prev_pulled = 0, prev_state = 0, next_state = 0, next_wstate = 0;
  logic [N-1:0] cell_data, wdata;
  logic pushed, pulled, keep, state, wstate;
  int checks = 0, failures = 0;

  sorting_cell #(.N(N), .KEY_W(KW), .KEEP_GATE(G), .FIRST(1'b0)) dut (
    .clk, .reset, .enable, .write,
    .cell_data_input(din), .prev_cell_data(prev_d), .prev_cell_data_pushed(prev_pushed),
    .prev_cell_data_pulled(prev_pulled), .prev_cell_state(prev_state),
    .next_cell_data(next_d), .next_cell_state(next_state),
    .next_cell_wdata(next_wd), .next_cell_wstate(next_wstate),
    .cell_data, .cell_data_is_pushed(pushed), .cell_data_is_pulled(pulled),
    .keep_data(keep), .cell_state(state), .cell_wdata(wdata), .cell_wstate(wstate));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] el(int key, int tag = 0);
    return {KW'(key), 16'(tag)};
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    write = 0; prev_pushed = 0; prev_pulled = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    @(negedge clk);
    check("empty after reset", state == 0);

    // Empty cell, empty cell above: does not claim.
    write = 1; din = el(100); prev_state = 0;
    #1 check("no push from empty cell", pushed == 0);
    @(negedge clk); idle();
    check("empty cell ignores input when above is empty", state == 0);

    // Empty cell, occupied cell above that keeps its element: claims.
    write = 1; din = el(100); prev_state = 1; prev_d = el(50);
    @(negedge clk); idle();
    check("empty cell claims input", state == 1 && cell_data == el(100));

    // Occupied, input larger: keeps its element.
    write = 1; din = el(120);
    #1 check("larger input: no kick out", pushed == 0);
    @(negedge clk); idle();
    check("larger input: keeps", cell_data == el(100));

    // Occupied, input smaller, above does not kick out: claims and kicks out.
    write = 1; din = el(80);
    #1 check("smaller input: kicks out", pushed == 1);
    @(negedge clk); idle();
    check("smaller input: claims", cell_data == el(80));

    // Above kicks out: must take the above element even if input is smaller.
    write = 1; din = el(10); prev_pushed = 1; prev_d = el(60);
    #1 check("forced take: kicks own", pushed == 1);
    @(negedge clk); idle();
    check("forced take: holds above element", cell_data == el(60));

    // Pull: takes the lower neighbour's write result.
    prev_pulled = 1; next_wd = el(70); next_wstate = 1;
    #1 check("pulled flag ripples", pulled == 1);
    @(negedge clk); idle();
    check("pull takes lower element", cell_data == el(70) && state == 1);
    prev_pulled = 1; next_wstate = 0;
    @(negedge clk); idle();
    check("pull from empty empties cell", state == 0);

    // Refill and test neighbour mark.
    write = 1; din = el(200); prev_state = 1; prev_d = el(190);
    @(negedge clk); idle();
    check("refill", cell_data == el(200));
    prev_d = el(175); next_state = 0;
    #1 check("keep: above within gate (25)", keep == 1);
    prev_d = el(174);
    #1 check("keep: above outside gate (26)", keep == 0);
    next_state = 1; next_d = el(224);
    #1 check("keep: below within gate", keep == 1);
    next_d = el(226);
    #1 check("keep: below outside gate", keep == 0);
    prev_state = 0; next_state = 0;

    // Enable low freezes the cell.
    enable = 0; write = 1; din = el(1); prev_state = 1;
    @(negedge clk); idle(); enable = 1;
    check("enable low freezes", cell_data == el(200));

    // Reset empties.
    reset = 1; @(negedge clk); reset = 0;
    check("reset empties", state == 0);

    // Random cycles against a direct model of the rules. The neighbour keys
    // are drawn around the cell's own key, above smaller and below larger, as
    // in a sorted chain; keys come from a small range so ties occur.
    for (int i = 0; i < 3000; i++) begin
      logic [N-1:0] d0, e_wd, e_next;
      logic s0, e_ws, e_push, e_keep, e_state;
      int k0;
      d0 = cell_data; s0 = state; k0 = int'(d0[N-1 -: KW]);
      enable      = ($urandom_range(0, 7) != 0);
      write       = ($urandom_range(0, 1) == 1);
      din         = el($urandom_range(0, 60), $urandom_range(0, 3));
      prev_state  = $urandom_range(0, 3) != 0;
      prev_pushed = prev_state && ($urandom_range(0, 2) == 0);
      prev_d      = el(k0 - $urandom_range(0, k0 < 40 ? k0 : 40), $urandom_range(0, 3));
      prev_pulled = $urandom_range(0, 3) == 0;
      next_state  = ($urandom_range(0, 1) == 1);
      next_d      = el(k0 + $urandom_range(0, 40));
      next_wstate = ($urandom_range(0, 1) == 1);
      next_wd     = el($urandom_range(0, 60));
      // Write phase per the rule set.
      e_wd = d0; e_ws = s0; e_push = 0;
      if (enable && write) begin
        if (prev_pushed) begin e_wd = prev_d; e_ws = 1; e_push = s0; end
        else if (!s0) begin if (prev_state) begin e_wd = din; e_ws = 1; end end
        else if (din < d0) begin e_wd = din; e_push = 1; end
      end
      e_keep = s0 && ((prev_state && k0 - int'(prev_d[N-1 -: KW]) <= G)
                   || (next_state && int'(next_d[N-1 -: KW]) - k0 <= G));
      #1;
      check("random: pushed", pushed == e_push);
      check("random: pulled", pulled == (enable && prev_pulled));
      check("random: keep", keep == e_keep);
      e_state = !enable ? s0 : prev_pulled ? next_wstate : e_ws;
      e_next  = !enable ? d0 : prev_pulled ? next_wd : e_wd;
      @(negedge clk);
      check("random: state", state == e_state);
      if (e_state) check("random: data", cell_data == e_next);
    end
    idle(); enable = 1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
