// output_result: the output result block, matching a recognition against the
// trained irises.
//
// When `en` is high the network output o is compared with the signature of
// each of the first `count` data bank entries, all in parallel. The nearest
// signature (lowest index on a tie) is taken; if it lies within TOL of o the
// block shows that signature, the number of the recognized iris, otherwise
// it shows 0. The result is registered: match_id and match_valid appear one
// cycle after en. Entries with signature 0 are ignored, since 0 means "no
// match". The nearest-signature rule and the tolerance are this design's
// choice; the document only says that a matched iris shows its number and
// anything else shows 0.
module output_result
  import iris_pkg::*;
#(
  parameter int DEPTH = 8,
  parameter int TOL   = 20,
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  sig_t          o,
  input  sig_t          sig_all [DEPTH],
  input  logic [CW-1:0] count,
  output logic          match_valid,
  output sig_t          match_id
);

  sig_t best_sig;
  logic [SIG_W:0] best_dist, diff;

  always_comb begin
    best_sig  = '0;
    best_dist = '1;
    for (int k = 0; k < DEPTH; k++) begin
      diff = (o >= sig_all[k]) ? (SIG_W+1)'(o - sig_all[k]) : (SIG_W+1)'(sig_all[k] - o);
      if (k < 32'(count) && sig_all[k] != '0 && diff < best_dist) begin
        best_dist = diff;
        best_sig  = sig_all[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match_valid <= 1'b0;
      match_id    <= '0;
    end else begin
      match_valid <= en;
      if (en) match_id <= (best_dist <= (SIG_W+1)'(TOL)) ? best_sig : '0;
    end
  end

endmodule
