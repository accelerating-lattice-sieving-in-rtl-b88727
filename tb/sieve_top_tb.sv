// sieve_top_tb: end-to-end test of sieve_top at its default parameters, with
// a 24-vector set (see sieve_top_run for what is checked).
module sieve_top_tb;
  sieve_top_run #(.K_SET(24), .NSINGLE(12)) run ();
endmodule
