// tb_words_pkg: builds link words in the layout that raw_decoder reads
// (three type bits on top, fields below), for the testbenches.
package tb_words_pkg;
  import l0_pkg::*;

  function automatic logic [31:0] w_fill();
    return {W_FILL, 29'h0};
  endfunction
  function automatic logic [31:0] w_slice_num(int n);
    return {W_SLICE, (29-SLICE_W)'(0), SLICE_W'(n)};
  endfunction
  function automatic logic [31:0] w_slice_time(int t);
    return {W_SLICE, 29'(t)};
  endfunction
  function automatic logic [31:0] w_image(int t);
    return {W_IMAGE, 29'(t)};
  endfunction
  function automatic logic [31:0] w_group(int src, int view, int fe);
    return {W_GROUP, 6'h0, SRC_W'(src), VIEW_W'(view), FE_W'(fe)};
  endfunction
  function automatic logic [31:0] w_data(int ch, int t);
    return {W_DATA, 8'h0, CH_W'(ch), HT_W'(t)};
  endfunction
  function automatic logic [31:0] w_adata(int x);
    return {W_ADATA, 29'(x)};
  endfunction
  function automatic logic [31:0] w_gtrl(int crc);
    return {W_GTRL, 13'h0, CRC_W'(crc)};
  endfunction
  function automatic logic [31:0] w_eos();
    return {W_EOS, 29'h0};
  endfunction
endpackage
