// iv_control: Moore state machine sequencing one instant value test cycle.
//
// IV_IDLE  : busy low; a high level on start begins a test cycle.
// IV_ACQ   : every filtered sample pair (sample_valid) is written into the two RAMs at
//            wr_addr, which counts the new sine values; after N of them (one period) the
//            machine moves on.
// IV_START : one clock in which corr_start launches the correlator.
// IV_PROC  : waits for the correlator's done pulse, then returns to IV_IDLE.
// busy, corr_start and the acquisition window are functions of the state only; the RAM
// write enable is the acquisition window gated with sample_valid. The first sample stored
// is the one whose strobe arrives in the clock start is seen or later.
module iv_control
  import blm_pkg::*;
#(
  parameter int unsigned N  = N_SAMPLES,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          sample_valid,
  input  logic          corr_done,
  output logic          busy,
  output logic          we,
  output logic [AW-1:0] wr_addr,
  output logic          corr_start,
  output iv_state_t     state
);

  iv_state_t state_next;

  always_comb begin
    state_next = state;
    unique case (state)
      IV_IDLE:  if (start) state_next = IV_ACQ;
      IV_ACQ:   if (sample_valid && wr_addr == AW'(N - 1)) state_next = IV_START;
      IV_START: state_next = IV_PROC;
      IV_PROC:  if (corr_done) state_next = IV_IDLE;
      default:  state_next = IV_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IV_IDLE;
      wr_addr <= '0;
    end else begin
      state <= state_next;
      if (state == IV_IDLE)  wr_addr <= '0;
      else if (we)           wr_addr <= wr_addr + 1'b1;
    end
  end

  assign busy       = (state != IV_IDLE);
  assign corr_start = (state == IV_START);
  assign we         = (state == IV_ACQ) && sample_valid;

  // The correlator only reports completion of a run this machine launched.
  assert property (@(posedge clk) disable iff (!rst_n) corr_done |-> state == IV_PROC)
    else $error("iv_control: correlator done outside processing");

endmodule
