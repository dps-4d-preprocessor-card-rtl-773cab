// interlace_a_and_b: interleaves the frequency 1 (A) and frequency 2 (B)
// sample words and writes them, sorted, into Memory 1.
//
// Whenever rdy_in reports that an A word and a B word are both ready, the
// controller writes A and then B. Each write holds rdy_out (the SRAM write
// strobe) high for two clocks with addr and w_data steady, waits three more
// clocks, and then advances the sample counter. The counter is read as
// {height, antenna, q, frequency}: frequency changes fastest, so A and B of
// one sample go out back to back, and the receiver's order "antenna 1..4 of
// each height" is followed. The address turns that count into the sorted
// record address {frequency, antenna, 0000, height, q} (see dps_pkg), which
// puts each antenna of each frequency in its own 0x08000-word region.
//
// State sequence per A/B pair (one clock each):
//   S1 (wait for rdy_in) S2 S3 S3A S3B S3C S4 S5  -> A written in S2,S3
//                        S2 S3 S3A S3B S3C S4 S5  -> B written in S2,S3
// and back to S1: an accepted pair occupies 14 clocks after the S1 clock.
//
// The state sequence, the two-clock write strobe, the counter fields and the
// address layout follow the original DPS-4D card. Own choices: a and b are captured when
// the pair is accepted (the pulse `take` tells the sources), `clear` restarts
// the counter at the start of a sampling period, and `idle` and `count` are
// brought out for the phase controller.
module interlace_a_and_b
  import dps_pkg::*;
(
  input  logic          clk,
  input  logic          reset,
  input  logic          clear,    // synchronous restart of counter and FSM
  input  logic          rdy_in,   // A and B inputs ready
  input  logic [DW-1:0] data_a,   // frequency 1 word
  input  logic [DW-1:0] data_b,   // frequency 2 word
  output logic          take,     // pair accepted this clock
  output logic [AW-1:0] addr,     // Memory 1 write address
  output logic [DW-1:0] w_data,   // interleaved write data
  output logic          rdy_out,  // write strobe, high in S2 and S3
  output logic          idle,     // waiting for the next pair
  output logic [CNT_W-1:0] count  // words written since clear
);

  typedef enum logic [3:0] {
    S0, S1, S2, S3, S3A, S3B, S3C, S4, S5
  } il_state_t;

  il_state_t    state, state_nx;
  arrival_idx_t cnt;
  logic [DW-1:0] a_hold, b_hold;

  always_comb begin
    state_nx = state;
    unique case (state)
      S0:  state_nx = S1;
      S1:  if (rdy_in) state_nx = S2;
      S2:  state_nx = S3;
      S3:  state_nx = S3A;
      S3A: state_nx = S3B;
      S3B: state_nx = S3C;
      S3C: state_nx = S4;
      S4:  state_nx = S5;
      S5:  state_nx = cnt.freq ? S2 : S1;
      default: state_nx = S0;
    endcase
  end

  assign take = (state == S1) && rdy_in && !clear;
  assign idle = (state == S1) || (state == S0);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state   <= S0;
      cnt     <= '0;
      rdy_out <= 1'b0;
      a_hold  <= '0;
      b_hold  <= '0;
    end else if (clear) begin
      state   <= S1;
      cnt     <= '0;
      rdy_out <= 1'b0;
    end else begin
      state   <= state_nx;
      rdy_out <= (state_nx == S2) || (state_nx == S3);
      if (state_nx == S4) cnt <= cnt + 1'b1;
      if (take) begin
        a_hold <= data_a;
        b_hold <= data_b;
      end
    end
  end

  assign addr   = addr_of_arrival(cnt);
  assign w_data = cnt.freq ? b_hold : a_hold;
  assign count  = cnt;

  // The write strobe is only ever two clocks long.
  a_strobe_len : assert property (@(posedge clk) disable iff (reset || clear)
    $rose(rdy_out) |=> rdy_out ##1 !rdy_out);

endmodule
