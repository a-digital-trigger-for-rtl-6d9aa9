// tb_raw_decoder: sends generated slices through the decoder and checks
// every hit (image, time, front-end, channel) one cycle after its word, the
// header fields, the slice/image/end-of-slice pulses, additional data and
// trailer words, fill words inside a slice, an empty slice, a worked example
// with images 1000 and 1023, the largest slice number, and that a word
// the state diagram does not allow raises `error` and makes the decoder wait
// for the next slice header.
module tb_raw_decoder;
  import l0_pkg::*;
  import tb_words_pkg::*;
  logic clk = 0, reset = 1, enable = 0;
  logic [31:0] data_in = '0;
  logic [SLICE_W-1:0] slice_number;
  logic [STIME_W-1:0] sts, sti;
  logic [SRC_W-1:0] src_id;
  logic [VIEW_W-1:0] view_id;
  logic [FE_W-1:0] frontend_id;
  logic [HT_W-1:0] first_hit_in_group;
  logic new_slice, new_image, new_data, hit_valid, adata_valid, crc_valid, end_of_slice, error;
  raw_hit_t hit;
  logic [28:0] adata;
  logic [CRC_W-1:0] crc;
  logic [3:0] fsm_state;
  int checks = 0, failures = 0;
  raw_hit_t exp_hits [$];
  int n_slice = 0, n_image = 0, n_eos = 0, n_adata = 0, n_crc = 0, n_err = 0, n_hits = 0;

  raw_decoder dut (.clk, .reset, .enable, .data_in, .slice_number, .start_time_of_slice(sts),
    .start_time_of_image(sti), .src_id, .view_id, .frontend_id, .first_hit_in_group, .new_slice, .new_image,
    .new_data, .hit_valid, .hit, .adata_valid, .adata, .crc_valid, .crc, .end_of_slice,
    .error, .fsm_state);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s @%0t", what, $time); end
  endtask

  task automatic send(logic [31:0] w);
    enable = 1; data_in = w;
    @(negedge clk);
    enable = 0;
  endtask

  // Monitor: samples just after the clock edge, when registered outputs have settled.
  always @(posedge clk) #1 if (!reset) begin
    if (new_slice) n_slice++;
    if (new_image) n_image++;
    if (end_of_slice) n_eos++;
    if (adata_valid) n_adata++;
    if (crc_valid) n_crc++;
    if (error) n_err++;
    if (hit_valid) begin
      n_hits++;
      check("new_data follows hit_valid", new_data);
      if (exp_hits.size() == 0) check("unexpected hit", 0);
      else check($sformatf("hit %p", hit), hit == exp_hits.pop_front());
    end
  end

  // One slice: nimg images, each with up to 3 groups of up to 4 hits.
  task automatic gen_slice(int sn, int nimg);
    send(w_slice_num(sn));
    send(w_slice_time(1000 * sn + 7));
    check("slice number", slice_number == SLICE_W'(sn));
    check("slice time", sts == 29'(1000 * sn + 7));
    for (int im = 0; im < nimg; im++) begin
      send(w_image(im));
      check("image time", sti == 29'(im));
      for (int g = 0; g < $urandom_range(1, 3); g++) begin
        int fe, src, view, first_t;
        fe = $urandom_range(0, 255); src = $urandom_range(0, 1023); view = $urandom_range(0, 31);
        send(w_group(src, view, fe));
        check("group ids", src_id == SRC_W'(src) && view_id == VIEW_W'(view) && frontend_id == FE_W'(fe));
        for (int h = 0; h < $urandom_range(1, 4); h++) begin
          raw_hit_t e;
          int ch, t;
          ch = $urandom_range(0, 127); t = $urandom_range(0, 16383);
          e.image = IMG_W'(im); e.time_ = HT_W'(t); e.fe = FE_W'(fe); e.ch = CH_W'(ch);
          exp_hits.push_back(e);
          send(w_data(ch, t));
          if (h == 0) first_t = t;
          check("time of first hit in group", first_hit_in_group == HT_W'(first_t));
          if ($urandom_range(0, 4) == 0) send(w_fill());
        end
        if ($urandom_range(0, 2) == 0) begin
          send(w_adata(32'h1abc));
          check("additional data", adata == 29'h1abc);
        end
        send(w_gtrl(32'h1234 + g));
        check("trailer word", crc == CRC_W'(32'h1234 + g));
      end
    end
    send(w_eos());
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
    send(w_fill()); send(w_data(1, 2));   // outside a slice: ignored
    check("nothing decoded outside a slice", n_hits == 0 && n_err == 0);
    // Latency: a hit word accepted at edge n is on hit_valid right after it.
    send(w_slice_num(1)); send(w_slice_time(5)); send(w_image(3)); send(w_group(1, 2, 3));
    exp_hits.push_back(raw_hit_t'{image: IMG_W'(3), time_: HT_W'(5), fe: FE_W'(3), ch: CH_W'(4)});
    enable = 1; data_in = w_data(4, 5);
    @(posedge clk); #1;
    enable = 0;
    check("hit one cycle after its word", hit_valid && hit.image == 3 && hit.time_ == 5 && hit.ch == 4 && hit.fe == 3);
    @(negedge clk);
    @(negedge clk);
    check("hit is one pulse", !hit_valid);
    send(w_gtrl(0)); send(w_eos());
    @(negedge clk);
    n_hits = 0; n_slice = 0; n_image = 0; n_eos = 0; n_crc = 0;
    for (int s = 2; s < 8; s++) gen_slice(s, $urandom_range(1, 5));
    @(negedge clk);
    check("all hits decoded", exp_hits.size() == 0);
    check("six slices", n_slice == 6 && n_eos == 6);
    check("no error on legal stream", n_err == 0);
    // Empty slice ending after the first and after the second header word.
    send(w_slice_num(9)); send(w_eos());
    send(w_slice_num(10)); send(w_slice_time(3)); send(w_eos());
    @(negedge clk);
    check("empty slices end", n_eos == 8 && n_err == 0);
    // Worked example of the format: slice 10 starting at time 400 with images
    // 1000 and 1023 (sources 800 and 801), then slice 11 at time 440, image 0.
    send(w_slice_num(10)); send(w_slice_time(400));
    check("slice 10 at 400", slice_number == 10 && sts == 400);
    send(w_image(1000)); send(w_group(800, 0, 0));
    exp_hits.push_back(raw_hit_t'{image: IMG_W'(1000), time_: HT_W'(85), fe: FE_W'(0), ch: CH_W'(0)});
    send(w_data(0, 85)); send(w_gtrl(0));
    send(w_image(1023)); send(w_group(800, 0, 0));
    exp_hits.push_back(raw_hit_t'{image: IMG_W'(1023), time_: HT_W'(45), fe: FE_W'(0), ch: CH_W'(0)});
    send(w_data(0, 45)); send(w_gtrl(0));
    check("source 800, image 1023", src_id == 800 && sti == 1023);
    send(w_group(801, 0, 1));
    exp_hits.push_back(raw_hit_t'{image: IMG_W'(1023), time_: HT_W'(55), fe: FE_W'(1), ch: CH_W'(2)});
    send(w_data(2, 55));
    check("source 801", src_id == 801);
    send(w_gtrl(0)); send(w_eos());
    send(w_slice_num(11)); send(w_slice_time(440)); send(w_image(0)); send(w_group(800, 0, 0));
    check("slice 11 at 440, image 0", slice_number == 11 && sts == 440 && sti == 0);
    exp_hits.push_back(raw_hit_t'{image: IMG_W'(0), time_: HT_W'(7), fe: FE_W'(0), ch: CH_W'(0)});
    send(w_data(0, 7)); send(w_gtrl(0)); send(w_eos());
    @(negedge clk);
    check("example decoded", exp_hits.size() == 0 && n_eos == 10 && n_err == 0);
    send(w_slice_num(2**SLICE_W - 1)); send(w_slice_time(1)); send(w_eos());
    check("largest slice number", slice_number == SLICE_W'(2**SLICE_W - 1));
    @(negedge clk);
    // Illegal: data right after an image header.
    send(w_slice_num(11)); send(w_slice_time(3)); send(w_image(0));
    send(w_data(1, 1));
    @(negedge clk);
    check("error on data after image header", n_err == 1);
    check("back to raw bit stream", fsm_state == 4'd0);
    check("error closes the slice", n_eos == 12);
    send(w_group(1, 1, 1)); send(w_data(1, 1));
    check("ignores words until next slice", n_err == 1);
    @(negedge clk);
    check("no hits after error", exp_hits.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
