// tb_pkg: testbench references shared by several testbenches.
//   tb_lut_line  : contents of one LUT line (a 4x4 tile of operand pairs), computed with ordinary
//                  arithmetic from the line address, independently of the design's LUT logic.
//   tb_fill_line : pattern of a never-written memory line, derived from its address.
//   tb_ref_idx   : position of entry (i, j) inside its line, from the documented layout.
package tb_pkg;
  import pmbc_pkg::*;

function automatic logic [LINE_W-1:0] tb_lut_line(input logic [ADDR_W-1:0] a);
  logic [LINE_W-1:0] l;
  logic        is_mul;
  logic [16:0] off;
  logic [7:0]  i, j;
  is_mul = a < ADD_LUT_BASE;
  off    = a[16:0];
  l      = '0;
  for (int e = 0; e < 16; e++) begin
    // off = {i[7:4], j[7:4], i[3:2], j[3:2], i[1:0], j[1:0], 0}
    i = {off[16:13], off[8:7], 2'(e >> 2)};
    j = {off[12:9],  off[6:5], 2'(e & 3)};
    l[e*16 +: 16] = is_mul ? 16'(i) * 16'(j) : 16'(i) + 16'(j);
  end
  return l;
endfunction

function automatic logic [LINE_W-1:0] tb_fill_line(input logic [ADDR_W-1:0] a);
  logic [LINE_W-1:0] l;
  for (int w = 0; w < LINE_W / 32; w++) l[w*32 +: 32] = {4'(w), a} ^ 32'h5A5A_0000;
  return l;
endfunction

  function automatic int tb_ref_idx(input logic [7:0] i, input logic [7:0] j);
    return int'(i % 4) * 4 + int'(j % 4);
  endfunction

  // expected byte address of LUT entry (i, j), written out bit by bit from the layout
  function automatic logic [ADDR_W-1:0] tb_ref_addr(input bit is_mul, input logic [7:0] i,
                                                    input logic [7:0] j);
    logic [16:0] off;
    off = '0;
    off[16:13] = i[7:4]; off[12:9] = j[7:4]; off[8:7] = i[3:2]; off[6:5] = j[3:2];
    off[4:3]   = i[1:0]; off[2:1]  = j[1:0];
    return (is_mul ? 28'hFFC_0000 : 28'hFFE_0000) + ADDR_W'(off);
  endfunction
endpackage
