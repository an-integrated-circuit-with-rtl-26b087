// Image acquisition sequencer: the system side of the probe.
//
// For each of num_beams transmit beams it runs the acquisition procedure:
//   1. LOAD   shift the beam's focusing delays into the array, all N rows in
//             parallel, one serial line per row, using the two-phase clock;
//   2. RESET  precharge every element comparator, with the count set to
//             cnt_lo;
//   3. FIRE   step the global Gray-code count from cnt_lo to cnt_hi, which
//             fires every element whose delay lies in that range at its own
//             step (the published procedure uses the full range 0..255);
//   4. RX     select the beam's receive aperture and power the amplifiers
//             (they stay on until the whole run ends), then wait RX_CYCLES.
//
// Load during receive: with load_in_rx high, the next beam's delays are
// shifted in during the current beam's receive window, and the sequence
// goes from RX straight to RESET. The receive window then lasts at least as
// long as the load (512 cycles). This saves the load time per beam, at the
// cost of digital switching during reception.
//
// Delay source: the sequencer presents dly_beam and dly_col and reads
// dly_val[i], the binary delay of element (i, dly_col), in the same cycle;
// it converts each value to Gray code before shifting it out. Because every
// row is one chain, the cell furthest from the input (column N-1) is sent
// first and each word is sent most significant bit first. beam_ap gives the
// receive aperture of beam dly_beam; it is sampled when reception starts.
//
// Clock phases: each bit takes four clk cycles: data change, ph1 high,
// ph1 low, ph2 high. The phases are registered and never overlap. With clk
// at 400 MHz the chain shifts at 100 MHz and a full load of 16 x 8 bits per
// row takes 512 cycles, 1.28 us. One count step lasts CNT_DIV cycles.
//
// Loading comes before the reset on purpose: a comparator that has not yet
// fired would fire while its register is being rewritten, but after a sweep
// that reached its delay every comparator has fired and stays quiet until
// the reset. Stray pulses during a load can therefore come only from the
// first load after power-up, when the comparators hold arbitrary states, or
// from elements whose delay lay outside the last sweep's cnt_lo..cnt_hi.
//
// The four steps, their order, the 0..255 Gray-code sweep, the reset and
// loading during reception come from the published procedure. The cycle
// counts (four cycles per bit, CNT_DIV, RST_CYCLES, RX_CYCLES), the delay
// source interface, the count range inputs and opening all switches
// (AP_NONE) outside reception are this design's choices.
module acq_sequencer
  import us_pkg::*;
#(
  parameter int unsigned NE         = 16,
  parameter int unsigned W          = 8,
  parameter int unsigned CNT_DIV    = 4,    // clk cycles per count step
  parameter int unsigned RST_CYCLES = 4,    // comparator precharge length
  parameter int unsigned RX_CYCLES  = 2048  // receive window per beam
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [7:0]             num_beams,
  input  logic                   load_in_rx,
  input  logic [W-1:0]           cnt_lo,
  input  logic [W-1:0]           cnt_hi,
  output logic [7:0]             dly_beam,
  output logic [$clog2(NE)-1:0]  dly_col,
  input  logic [W-1:0]           dly_val [NE],
  input  ap_sel_t                beam_ap,
  output logic                   dl_in [NE],
  output logic                   clk_ph1,
  output logic                   clk_ph2,
  output logic [W-1:0]           count,
  output logic                   cmp_reset,
  output ap_sel_t                ap,
  output logic                   amp_en,
  output logic                   busy,
  output logic                   done
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_RESET, S_FIRE, S_RX, S_DONE
  } state_e;

  localparam int unsigned CW = $clog2(NE);
  localparam int unsigned BW = $clog2(W);

  state_e         state;
  logic [15:0]    timer;
  logic [7:0]     beam_cnt;    // beam being transmitted and received
  logic           ld_go;       // one-cycle start of the load engine
  logic           ld_busy;
  logic           preloaded;   // next beam's load started during RX
  logic [W-1:0]   cnt_bin;
  logic           cnt_ld;
  logic           cnt_en;
  logic           last_beam;
  logic           load_idle;

  logic [1:0]     phase;
  logic [BW-1:0]  bit_idx;
  logic [W-1:0]   word [NE];

  // Global counter: loaded with cnt_lo during reset, advanced at the end of
  // each count step until it reaches cnt_hi.
  gray_counter #(.W(W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .ld    (cnt_ld),
    .ld_val(cnt_lo),
    .en    (cnt_en),
    .count (count),
    .bin   (cnt_bin)
  );

  assign cnt_ld    = (state == S_RESET);
  assign cnt_en    = (state == S_FIRE) && (timer == 16'(CNT_DIV - 1)) && (cnt_bin != cnt_hi);
  assign busy      = (state != S_IDLE);
  assign last_beam = (beam_cnt == num_beams - 1'b1);
  assign load_idle = !ld_go && !ld_busy;

  // ---------------------------------------------------------------------
  // Load engine: shifts N words per row out on the N serial lines.
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_busy <= 1'b0;
      phase   <= '0;
      bit_idx <= '0;
      dly_col <= '0;
      clk_ph1 <= 1'b0;
      clk_ph2 <= 1'b0;
      for (int i = 0; i < NE; i++) begin
        dl_in[i] <= 1'b0;
        word[i]  <= '0;
      end
    end else if (!ld_busy) begin
      clk_ph1 <= 1'b0;
      clk_ph2 <= 1'b0;
      if (ld_go) begin
        ld_busy <= 1'b1;
        dly_col <= CW'(NE - 1);
        bit_idx <= BW'(W - 1);
        phase   <= '0;
      end
    end else begin
      phase <= phase + 1'b1;
      unique case (phase)
        2'd0: begin
          clk_ph2 <= 1'b0;
          for (int i = 0; i < NE; i++) begin
            automatic logic [W-1:0] w =
              (bit_idx == BW'(W - 1)) ? bin2gray(dly_val[i]) : word[i];
            word[i]  <= w;
            dl_in[i] <= w[bit_idx];
          end
        end
        2'd1: clk_ph1 <= 1'b1;
        2'd2: clk_ph1 <= 1'b0;
        2'd3: begin
          clk_ph2 <= 1'b1;
          if (bit_idx != '0) begin
            bit_idx <= bit_idx - 1'b1;
          end else begin
            bit_idx <= BW'(W - 1);
            if (dly_col != '0) dly_col <= dly_col - 1'b1;
            else               ld_busy <= 1'b0;
          end
        end
      endcase
    end
  end

  // ---------------------------------------------------------------------
  // Acquisition steps.
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      timer     <= '0;
      beam_cnt  <= '0;
      dly_beam  <= '0;
      ld_go     <= 1'b0;
      preloaded <= 1'b0;
      cmp_reset <= 1'b0;
      ap        <= '{mode: AP_NONE, row: '0};
      amp_en    <= 1'b0;
      done      <= 1'b0;
    end else begin
      done  <= 1'b0;
      ld_go <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start && num_beams != 8'd0) begin
            state    <= S_LOAD;
            beam_cnt <= '0;
            dly_beam <= '0;
            ld_go    <= 1'b1;
          end
        end

        S_LOAD: begin
          ap <= '{mode: AP_NONE, row: '0};
          if (load_idle) begin
            state <= S_RESET;
            timer <= '0;
          end
        end

        S_RESET: begin
          ap        <= '{mode: AP_NONE, row: '0};
          cmp_reset <= 1'b1;
          preloaded <= 1'b0;
          timer     <= timer + 1'b1;
          if (timer == 16'(RST_CYCLES)) begin
            cmp_reset <= 1'b0;
            state     <= S_FIRE;
            timer     <= '0;
          end
        end

        S_FIRE: begin
          if (timer == 16'(CNT_DIV - 1)) begin
            timer <= '0;
            if (cnt_bin == cnt_hi) begin
              state  <= S_RX;
              ap     <= beam_ap;
              amp_en <= 1'b1;
            end
          end else begin
            timer <= timer + 1'b1;
          end
        end

        S_RX: begin
          if (timer != 16'hFFFF) timer <= timer + 1'b1;
          // Optionally start the next beam's load right away.
          if (timer == 16'd0 && load_in_rx && !last_beam) begin
            dly_beam  <= dly_beam + 1'b1;
            preloaded <= 1'b1;
          end
          if (timer == 16'd1 && preloaded) ld_go <= 1'b1;
          if (timer >= 16'(RX_CYCLES - 1) && timer >= 16'd2 && load_idle) begin
            timer <= '0;
            if (last_beam) begin
              state <= S_DONE;
            end else begin
              beam_cnt <= beam_cnt + 1'b1;
              ap       <= '{mode: AP_NONE, row: '0};
              if (preloaded) begin
                state <= S_RESET;
              end else begin
                state    <= S_LOAD;
                dly_beam <= dly_beam + 1'b1;
                ld_go    <= 1'b1;
              end
            end
          end
        end

        S_DONE: begin
          ap     <= '{mode: AP_NONE, row: '0};
          amp_en <= 1'b0;
          done   <= 1'b1;
          state  <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
