// fir_control: sequencer of the time-multiplexed multiply-accumulate.
//
// The filter has one multiplier and one adder, so each output takes O clocks,
// one per tap. In IDLE, x_ready is high; a clock edge with x_valid high
// pulses shift (the datapath takes the sample) and starts a sweep. During the
// sweep, sel counts 0..O-1, one tap per clock, with first high on tap 0 and
// y_load high on tap O-1 (the datapath then writes the finished sum into its
// output register). y_valid is a registered pulse in the clock after that
// edge, i.e. it rises O clocks after the edge that took the sample.
// x_ready is also high on the last tap, so a sample offered then starts the
// next sweep at once and samples can be taken every O clocks.
//
// zero (the filter's clear) and rst stop any sweep and return to IDLE on the
// next edge. The sequential one-tap-per-clock schedule follows the
// specification; the handshake, the overlap on the last tap and the abort on
// zero are this design's choices.
module fir_control #(
  parameter int unsigned O     = fir_pkg::O_DEF,
  parameter int unsigned LOG2O = fir_pkg::LOG2O_DEF
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             zero,
  input  logic             x_valid,
  output logic             x_ready,
  output logic             shift,
  output logic [LOG2O-1:0] sel,
  output logic             first,
  output logic             mac_en,
  output logic             y_load,
  output logic             y_valid,
  output logic             busy
);
  typedef enum logic {IDLE, MAC} state_t;
  state_t state;
  logic [LOG2O-1:0] cnt;
  logic last;

  always_comb begin
    mac_en  = (state == MAC);
    busy    = mac_en;
    sel     = cnt;
    first   = mac_en && (cnt == '0);
    last    = mac_en && (32'(cnt) == O - 1);
    y_load  = last;
    x_ready = !mac_en || last;
    shift   = x_valid && x_ready && !zero;
  end

  always_ff @(posedge clk) begin
    if (rst || zero) begin
      state   <= IDLE;
      cnt     <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= last;
      if (shift) begin
        state <= MAC;
        cnt   <= '0;
      end else if (last) begin
        state <= IDLE;
        cnt   <= '0;
      end else if (mac_en) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // tap counter must be wide enough for O taps
  initial assert (O >= 1 && O <= (1 << LOG2O))
    else $error("fir_control: LOG2O too small for O taps");
  // the sweep never runs past the last tap
  a_cnt_range: assert property (@(posedge clk) disable iff (rst) mac_en |-> 32'(cnt) < O);
endmodule
