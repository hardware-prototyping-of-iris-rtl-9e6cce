// data_bank: the data bank of trained irises.
//
// DEPTH entries, each one iris feature vector (N_IN 8-bit features, three by default) and the
// iris signature (its number, SIG_W bits, the desired network output). The
// host writes entries through a synchronous write port (we, waddr, wpix,
// wsig). During training the controller reads feature vectors through the
// asynchronous read port (raddr -> rpix, rsig, same cycle). All signatures
// are also presented in parallel (sig_all) so that the output result block
// can compare a network output against every trained iris at once. Contents
// reset to zero. The depth of 8 is the number of distinct irises in the
// published training trace; the organisation is this design's choice.
module data_bank
  import iris_pkg::*;
#(
  parameter int DEPTH = 8,
  parameter int N_IN  = N_INPUTS,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  pix_t          wpix    [N_IN],
  input  sig_t          wsig,
  input  logic [AW-1:0] raddr,
  output pix_t          rpix    [N_IN],
  output sig_t          rsig,
  output sig_t          sig_all [DEPTH]
);

  pix_t mem_pix [DEPTH][N_IN];
  sig_t mem_sig [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) begin
        mem_sig[k] <= '0;
        for (int i = 0; i < N_IN; i++) mem_pix[k][i] <= '0;
      end
    end else if (we && (32'(waddr) < DEPTH)) begin
      mem_pix[waddr] <= wpix;
      mem_sig[waddr] <= wsig;
    end
  end

  assign rpix    = mem_pix[raddr];
  assign rsig    = mem_sig[raddr];
  assign sig_all = mem_sig;

endmodule
