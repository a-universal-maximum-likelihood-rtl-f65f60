// Testbench of the secondary block: a noise search block for weight 3, fed
// channel outputs with 3- and 4-bit errors. Weight-4 errors must be forwarded
// (reported as failures by the decoder) after all 25256 generator cycles.
module tb_secondary_block;
  search_block_checker #(.MIN_HW(3), .MAX_HW(3), .TESTS(24), .W_LO(3), .W_HI(4)) chk ();
endmodule
