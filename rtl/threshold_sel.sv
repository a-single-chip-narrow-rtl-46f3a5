// threshold_sel: adaptive choice of N and the excision threshold.
//
// sigma is compared with the four programmable levels (expected in ascending
// order); the number of levels it exceeds, 0..4, selects one of the five
// programmable scale factors N (a larger sigma, i.e. stronger interference,
// should select a smaller N). The threshold is mu + N*sigma, with N in
// unsigned Q4.4 and mu, sigma, threshold in dB with LF fraction bits.
// Purely combinational. The comparison against four levels and the choice
// among five N follow the design; the encoding and ordering are this design's.
module threshold_sel
  import fdis_pkg::*;
(
  input  logic [DB_W-1:0]             mu,
  input  logic [DB_W-1:0]             sigma,
  input  logic [NLEV-1:0][DB_W-1:0]   sigma_lvl,
  input  logic [NSEL-1:0][NV_W-1:0]   n_val,
  output logic [2:0]                  n_sel,
  output logic [DB_W+NV_W-NV_F:0]     thr
);
  logic [DB_W+NV_W-1:0] prod;

  always_comb begin
    n_sel = '0;
    for (int i = 0; i < NLEV; i++) if (sigma > sigma_lvl[i]) n_sel = n_sel + 3'd1;
    prod = (DB_W+NV_W)'(sigma) * (DB_W+NV_W)'(n_val[n_sel]);
    thr  = (DB_W+NV_W-NV_F+1)'(mu) + (DB_W+NV_W-NV_F+1)'(prod >> NV_F);
  end
endmodule
