// bslm_ctrl: sequences one time step of the localisation array.
//
// The published design shows no controller; this one is this design's own. On start
// it samples the photodiode bits and the UGV position (held steady for the
// whole step), raises en for N_SC clocks so that every stochastic Bayesian
// module runs against its held prior, then gives one load clock in which the
// prior registers take the new posteriors and the max tree samples them. It
// waits for the max tree's valid_o and then returns to idle.
//
// Timing: start is taken only while busy is low; busy is high from the clock
// after start until the clock after the max tree answers.
module bslm_ctrl
  import bslm_pkg::*;
#(
  parameter int unsigned N_SC = 2048
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  pos_t             x_ugv_i,
  input  logic [NSECT-1:0] z_i,
  input  logic             tree_valid,
  output pos_t             x_ugv_q,
  output logic [NSECT-1:0] z_q,
  output logic             en,
  output logic             load,
  output logic             busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_LOAD, S_WAIT} state_e;

  localparam int unsigned CNTW = $clog2(N_SC + 1);

  state_e          state;
  logic [CNTW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      x_ugv_q <= '0;
      z_q     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          x_ugv_q <= x_ugv_i;
          z_q     <= z_i;
          cnt     <= '0;
          state   <= S_RUN;
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNTW'(N_SC - 1)) state <= S_LOAD;
        end
        S_LOAD: state <= S_WAIT;
        S_WAIT: if (tree_valid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    en   = (state == S_RUN);
    load = (state == S_LOAD);
    busy = (state != S_IDLE);
  end

  // the max tree answers only after a load
  assert property (@(posedge clk) disable iff (!rst_n) tree_valid |-> state == S_WAIT);

endmodule
