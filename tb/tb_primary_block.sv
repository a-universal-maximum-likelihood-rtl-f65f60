// Testbench of the primary block: a noise search block for weights 1 and 2,
// fed channel outputs with 1-, 2- and 3-bit errors. Weight-3 errors must be
// forwarded after all 8 + 568 generator cycles.
module tb_primary_block;
  search_block_checker #(.MIN_HW(1), .MAX_HW(2), .TESTS(300), .W_LO(1), .W_HI(3)) chk ();
endmodule
