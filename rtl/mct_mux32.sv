// mct_mux32: behavioural model (not synthesizable) of one 32-to-1 output
// multiplexer built from two 16-to-1 analog multiplexers.
//
// Both halves share the address ad[3:0]. Following the board wiring, the
// half carrying inputs 0..15 is enabled by ad[4] and the half carrying inputs
// 16..31 by ad4n, so address k selects input (k + 16) mod 32: a scan from
// address 0 to 31 reads inputs 16..31 and then 0..15. The drains of the two
// halves are tied together; since exactly one half is enabled (ad4n is the
// complement of ad[4]) the model adds the two outputs.
module mct_mux32 (
  input  logic [4:0] ad,
  input  logic       ad4n,
  input  real        s [32],
  output real        d
);

  real s_lo [16];
  real s_hi [16];
  real d_lo, d_hi;

  for (genvar i = 0; i < 16; i++) begin : g_split
    assign s_lo[i] = s[i];
    assign s_hi[i] = s[i + 16];
  end

  mct_adg406 u_lo (.en(ad[4]), .a(ad[3:0]), .s(s_lo), .d(d_lo));
  mct_adg406 u_hi (.en(ad4n),  .a(ad[3:0]), .s(s_hi), .d(d_hi));

  assign d = d_lo + d_hi;

endmodule
