// nn_controller: sequencer of the three operating modes of the network.
//
//   mode 01  random weight generation: on entering the mode all
//            N_HID*(N_IN+1) + N_HID+1 weights (11 for 3-2-1) are loaded from
//            the random weight generator, one per cycle: hidden neuron 0
//            slots 0..N_IN, hidden neuron 1 slots 0..N_IN, ..., then output
//            slots 0..N_HID (the last slot of each neuron is its threshold);
//            init_done then rises.
//   mode 10  training: the data bank entries 0..count-1 are presented in
//            turn, over and over, while the mode stays 10. Each presentation
//            takes 4 cycles: IDLE (input nodes load the entry), HID (hidden
//            outputs registered), OUT (network output registered), UPD
//            (adjusted weights written). `epochs` counts completed passes.
//   mode 11  testing: a test vector is accepted when test_valid and
//            test_ready are both high; HID and OUT follow and MATCH enables
//            the output result block, whose result appears on the next
//            cycle: 4 cycles from acceptance to match_valid. No weight
//            changes.
//   mode 00  idle.
// A mode change takes effect at the end of the presentation in progress. The
// mode codes 01/10/11 follow the document; the cycle-level sequence is this
// design's choice.
module nn_controller
  import iris_pkg::*;
#(
  parameter int DEPTH = 8,
  parameter int N_IN  = N_INPUTS,
  parameter int N_HID = N_HIDDEN,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW   = $clog2(DEPTH + 1),
  localparam int JW   = (N_HID > 1) ? $clog2(N_HID) : 1,
  localparam int IW   = $clog2(N_IN + 1),
  localparam int OW   = $clog2(N_HID + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mode_e         mode,
  input  logic [CW-1:0] count,       // bank entries used for training, 1..DEPTH
  input  logic          test_valid,
  output logic          test_ready,
  // random weight generation
  output logic          rng_step,
  output logic          init_we_h,
  output logic [JW-1:0] init_j,      // hidden neuron
  output logic [IW-1:0] init_i,      // hidden weight slot
  output logic          init_we_o,
  output logic [OW-1:0] init_oi,     // output weight slot
  output logic          init_done,
  // datapath strobes
  output logic [AW-1:0] bank_raddr,
  output logic          il_load,
  output logic          il_sel_test,
  output logic          h_cap,
  output logic          o_cap,
  output logic          w_upd,
  output logic          res_en,
  // status
  output logic [15:0]   epochs
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_HID, S_OUT, S_UPD, S_MATCH} state_e;

  state_e        state;
  logic          init_out;     // init has reached the output neuron
  logic          init_seen;    // init already run in this stay in mode 01
  logic          testing;      // current presentation is a test
  logic [AW-1:0] idx;

  wire start_init  = (mode == MODE_INIT) && !init_seen;
  wire start_train = (mode == MODE_TRAIN) && (count != '0);
  wire start_test  = (mode == MODE_TEST) && test_valid;

  assign test_ready  = (state == S_IDLE) && (mode == MODE_TEST);
  assign bank_raddr  = idx;
  assign il_load     = (state == S_IDLE) && (start_train || start_test) && !start_init;
  assign il_sel_test = (mode == MODE_TEST);
  assign h_cap       = (state == S_HID);
  assign o_cap       = (state == S_OUT);
  assign w_upd       = (state == S_UPD);
  assign res_en      = (state == S_MATCH);
  assign rng_step    = (state == S_INIT);
  assign init_we_h   = (state == S_INIT) && !init_out;
  assign init_we_o   = (state == S_INIT) && init_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      init_out  <= 1'b0;
      init_j    <= '0;
      init_i    <= '0;
      init_oi   <= '0;
      init_seen <= 1'b0;
      init_done <= 1'b0;
      testing   <= 1'b0;
      idx       <= '0;
      epochs    <= '0;
    end else begin
      if (mode != MODE_INIT) init_seen <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_init) begin
            state    <= S_INIT;
            init_out <= 1'b0;
            init_j   <= '0;
            init_i   <= '0;
            init_oi  <= '0;
          end else if (start_train || start_test) begin
            state   <= S_HID;
            testing <= start_test;
          end
        end
        S_INIT: begin
          if (!init_out) begin
            if (32'(init_i) == N_IN) begin
              init_i <= '0;
              if (32'(init_j) == N_HID - 1) init_out <= 1'b1;
              else                          init_j   <= init_j + JW'(1);
            end else begin
              init_i <= init_i + IW'(1);
            end
          end else if (32'(init_oi) == N_HID) begin
            state     <= S_IDLE;
            init_seen <= 1'b1;
            init_done <= 1'b1;
          end else begin
            init_oi <= init_oi + OW'(1);
          end
        end
        S_HID: state <= S_OUT;
        S_OUT: state <= testing ? S_MATCH : S_UPD;
        S_UPD: begin
          state <= S_IDLE;
          if (32'(idx) + 1 >= 32'(count)) begin
            idx    <= '0;
            epochs <= epochs + 16'd1;
          end else begin
            idx <= idx + AW'(1);
          end
        end
        S_MATCH: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
