// Shared testbench helpers: check counting and load-bus word builders.
`ifndef TB_PE_UTIL_SVH
`define TB_PE_UTIL_SVH
function automatic snap_pkg::ld_word_t mk_w(int addr, int data, int cidx);
  snap_pkg::ld_word_t x = '0;
  x.kind = snap_pkg::LD_W; x.addr = snap_pkg::WA_W'(addr); x.data = snap_pkg::DW'(data);
  x.cidx = snap_pkg::CIDX_W'(cidx);
  return x;
endfunction
function automatic snap_pkg::ld_word_t mk_seg(int seg, int ptr, int r, int k);
  snap_pkg::ld_word_t x = '0;
  x.kind = snap_pkg::LD_WSEG; x.addr = snap_pkg::WA_W'(seg); x.len = snap_pkg::LEN_W'(ptr);
  x.r = snap_pkg::R_W'(r); x.k = snap_pkg::K_W'(k);
  return x;
endfunction
function automatic snap_pkg::ld_word_t mk_wmeta(int len, int nseg, int s);
  snap_pkg::ld_word_t x = '0;
  x.kind = snap_pkg::LD_WMETA; x.len = snap_pkg::LEN_W'(len); x.k = snap_pkg::K_W'(nseg);
  x.s = snap_pkg::S_W'(s);
  return x;
endfunction
function automatic snap_pkg::ld_word_t mk_ia(int addr, int data, int cidx);
  snap_pkg::ld_word_t x = '0;
  x.kind = snap_pkg::LD_IA; x.addr = snap_pkg::WA_W'(addr); x.data = snap_pkg::DW'(data);
  x.cidx = snap_pkg::CIDX_W'(cidx);
  return x;
endfunction
function automatic snap_pkg::ld_word_t mk_iameta(int len, int h, int w);
  snap_pkg::ld_word_t x = '0;
  x.kind = snap_pkg::LD_IAMETA; x.len = snap_pkg::LEN_W'(len);
  x.h = snap_pkg::HW_W'(h); x.w = snap_pkg::HW_W'(w);
  return x;
endfunction
`endif
