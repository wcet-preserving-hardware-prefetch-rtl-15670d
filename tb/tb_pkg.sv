// tb_pkg: helpers shared by the testbenches. exp_line gives the contents
// the memory model returns for a line address, so any testbench can check
// data without keeping a copy of memory.
package tb_pkg;
  import bt_pkg::*;
  function automatic line_t exp_line(laddr_t a);
    logic [31:0] w;
    w = {4'h0, a} ^ 32'h5A5A_0000;
    return {w + 32'd3, w + 32'd2, w + 32'd1, w};
  endfunction
endpackage
