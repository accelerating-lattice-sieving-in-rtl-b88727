// sieve_top_full_tb: end-to-end test of sieve_top at its default parameters
// with the whole 256-entry on-chip set filled and sieved (see sieve_top_run
// for what is checked).
module sieve_top_full_tb;
  sieve_top_run #(.K_SET(256), .NSINGLE(12), .WATCHDOG(1_000_000)) run ();
endmodule
