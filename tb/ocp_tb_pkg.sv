// ocp_tb_pkg: helpers shared by the testbenches.
// init_word gives the power-up contents of the memory targets, so that a
// testbench can predict reads of words it never wrote.
package ocp_tb_pkg;
  function automatic logic [31:0] init_word(int unsigned target, logic [31:0] addr);
    return (addr * 32'h9E37_79B1) ^ (32'h5A00_0000 + target);
  endfunction
endpackage
