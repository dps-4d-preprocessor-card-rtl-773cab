// phase_controller: runs the card through its sampling and copying phases.
//
// The timing function marks each receive window with SAMPLE_N (active low)
// and the whole coherent integration with CIT_ON. While SAMPLE_N is low the
// card samples: received words go to Memory 1 while the DDESC reads the
// previous record from Memory 2. When SAMPLE_N returns high the card copies
// the new record from Memory 1 to Memory 2, then raises a one-clock
// `record_ready` that loads the IDE side and sets INTRQ. The first window
// after CIT_ON therefore produces no IDE traffic, and each later window reads
// the record of the window before it.
//
// Phases: IDLE -> SAMPLING on SAMPLE_N low (pulse samp_start clears the
// nibble assemblers and the interleaver). SAMPLING -> COPYING once SAMPLE_N
// is high and the interleaver has finished its current pair (pulse
// copy_start, with the number of complete heights written). COPYING -> IDLE
// on copy_done (pulse record_ready). A SAMPLE_N that falls during copying
// starts sampling as soon as the copy ends. CIT_ON low returns the card to
// IDLE at once and flushes the IDE side (pulse flush).
//
// SAMPLE_N and CIT_ON are passed through two flip-flops each, so they may come
// from another clock domain; their effect is two clocks late.
//
// The phases, their order and the INTRQ after each copy follow the timing
// diagram of the original DPS-4D card. The synchronisers, the wait for the interleaver, the
// late-start rule and the CIT_ON flush are this design's own choices.
module phase_controller
  import dps_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  input  logic             cit_on,      // coherent integration running
  input  logic             sample_n,    // receive window, active low
  input  logic             il_idle,     // interleaver between pairs
  input  logic [CNT_W-1:0] il_count,    // interleaver word count
  input  logic             copy_done,   // copy engine finished
  output phase_t           phase,
  output logic             samp_start,  // one clock: new sampling period
  output logic             copy_start,  // one clock: start copying
  output logic [HGT_W:0]   heights,     // complete heights in the record
  output logic             record_ready,// one clock: Memory 2 holds a new record
  output logic             flush        // one clock: CIT_ON dropped
);

  logic [1:0] samp_sync, cit_sync;
  logic       sampling_req, cit;

  assign sampling_req = !samp_sync[1];
  assign cit          = cit_sync[1];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      samp_sync <= 2'b11;
      cit_sync  <= 2'b00;
    end else begin
      samp_sync <= {samp_sync[0], sample_n};
      cit_sync  <= {cit_sync[0], cit_on};
    end
  end

  logic cit_q;
  logic [HGT_W-1:0] il_hgt;   // height field of the interleaver count
  assign il_hgt = il_count[CNT_W-1 -: HGT_W];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      phase        <= PH_IDLE;
      samp_start   <= 1'b0;
      copy_start   <= 1'b0;
      record_ready <= 1'b0;
      flush        <= 1'b0;
      heights      <= '0;
      cit_q        <= 1'b0;
    end else begin
      samp_start   <= 1'b0;
      copy_start   <= 1'b0;
      record_ready <= 1'b0;
      flush        <= 1'b0;
      cit_q        <= cit;
      if (!cit) begin
        phase <= PH_IDLE;
        flush <= cit_q;
      end else begin
        unique case (phase)
          PH_IDLE: if (sampling_req) begin
            phase      <= PH_SAMPLING;
            samp_start <= 1'b1;
          end
          PH_SAMPLING: if (!sampling_req && il_idle && !samp_start) begin
            phase      <= PH_COPYING;
            copy_start <= 1'b1;
            heights    <= {1'b0, il_hgt};
          end
          PH_COPYING: if (copy_done && !copy_start) begin
            phase        <= PH_IDLE;
            record_ready <= 1'b1;
          end
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

endmodule
