// ro_puf -- ring-oscillator physical unclonable function with 1-out-of-k masking.
//
// N_OSC identically laid-out ring oscillators (outside this module, inputs
// `ro`) differ in frequency only through manufacturing variation. Two
// multiplexers pick a pair, two counters count the edges of each over a window
// of WINDOW clock cycles, and the comparison "first count > second count"
// gives one response bit. Pair p of the fixed pair sequence uses oscillators
// p mod N_OSC and (p + N_OSC/2 - 1) mod N_OSC; response bit j owns the K_MASK
// pairs p = j*K_MASK .. j*K_MASK+K_MASK-1.
//
//   initialise (regen = 0): all K_MASK pairs of each bit are measured and the
//     pair whose counts are furthest apart gives the bit, since distant
//     frequencies are the least likely to swap order with temperature or
//     voltage. The choice is returned as a one-hot mask of K_MASK bits per
//     response bit, which may be stored in public.
//   re-generate (regen = 1): only the pair marked in `mask_in` is measured.
//
// Mux/counter/compare structure, the masking scheme and the default sizes
// (1024 oscillators, 1-out-of-8, 127 bits for a BCH(127,64) code) follow the
// architecture. This design's choices: the counters run in the system clock
// domain and count rising edges of the selected oscillator after a two-flop
// synchroniser (so an oscillator must run below half the clock rate), the
// window length, the pair sequence, and ties keeping the earlier pair.
//
// Interface: pulse `start` with `regen` and `mask_in` valid; `done` pulses when
// all N_BITS bits are ready in `response` / `mask_out`, which hold until the
// next start. Time per measured pair: WINDOW + SETTLE + 2 cycles; initialise
// measures N_BITS*K_MASK pairs, re-generate N_BITS pairs plus one cycle for
// each candidate passed over before the masked one. `done` rises
// 1 + pairs*(WINDOW+5) (+ skips) clock edges after the edge sampling `start`.
module ro_puf #(
  parameter int unsigned N_OSC  = 1024,
  parameter int unsigned K_MASK = 8,
  parameter int unsigned N_BITS = 127,
  parameter int unsigned WINDOW = 1024,
  parameter int unsigned CNT_W  = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_OSC-1:0]          ro,
  input  logic                      start,
  input  logic                      regen,
  input  logic [N_BITS*K_MASK-1:0]  mask_in,
  output logic                      busy,
  output logic                      done,
  output logic [N_BITS-1:0]         response,
  output logic [N_BITS*K_MASK-1:0]  mask_out
);

  localparam int unsigned SETTLE = 3;
  localparam int unsigned OW = $clog2(N_OSC);
  localparam int unsigned PW = $clog2(N_BITS * K_MASK);
  localparam int unsigned KW = (K_MASK > 1) ? $clog2(K_MASK) : 1;
  localparam int unsigned BW = $clog2(N_BITS);
  localparam int unsigned WW = $clog2(WINDOW + SETTLE + 1);

  typedef enum logic [2:0] {S_IDLE, S_PICK, S_SETTLE, S_COUNT, S_CMP} state_e;

  state_e           state;
  logic             regen_q;
  logic [BW-1:0]    bit_q;
  logic [KW-1:0]    cand_q;
  logic [WW-1:0]    tmr_q;
  logic [OW-1:0]    sel_a, sel_b;
  logic [2:0]       sync_a, sync_b;
  logic [CNT_W-1:0] cnt_a, cnt_b;
  logic [CNT_W-1:0] best_d;
  logic             best_bit;
  logic [KW-1:0]    best_c;
  logic [PW-1:0]    pair;
  logic [CNT_W-1:0] cnt_dist;
  logic             cmp_bit;

  assign busy = (state != S_IDLE);
  assign pair = PW'(int'(bit_q) * K_MASK + int'(cand_q));

  // fixed pair sequence
  always_comb begin
    sel_a = OW'(int'(pair) % N_OSC);
    sel_b = OW'((int'(pair) + N_OSC / 2 - 1) % N_OSC);
  end

  logic          take, nb;
  logic [KW-1:0] nc;

  assign cmp_bit = cnt_a > cnt_b;
  // keep this pair if it is the first candidate or further apart than the best
  assign take    = regen_q || (cand_q == '0) || (cnt_dist > best_d);
  assign nb      = take ? cmp_bit : best_bit;
  assign nc      = take ? cand_q : best_c;
  assign cnt_dist    = cmp_bit ? cnt_a - cnt_b : cnt_b - cnt_a;

  // the two multiplexers feed synchronisers and edge detectors
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_a <= '0;
      sync_b <= '0;
    end else begin
      sync_a <= {sync_a[1:0], ro[sel_a]};
      sync_b <= {sync_b[1:0], ro[sel_b]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      regen_q  <= 1'b0;
      bit_q    <= '0;
      cand_q   <= '0;
      tmr_q    <= '0;
      cnt_a    <= '0;
      cnt_b    <= '0;
      best_d   <= '0;
      best_bit <= 1'b0;
      best_c   <= '0;
      done     <= 1'b0;
      response <= '0;
      mask_out <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          regen_q  <= regen;
          bit_q    <= '0;
          cand_q   <= '0;
          response <= '0;
          mask_out <= regen ? mask_in : '0;
          state    <= S_PICK;
        end
        // skip pairs not selected by the stored mask when re-generating
        S_PICK: begin
          if (regen_q && !mask_in[int'(bit_q) * K_MASK + int'(cand_q)]) begin
            if (cand_q == KW'(K_MASK - 1)) begin
              cand_q <= '0;
              if (bit_q == BW'(N_BITS - 1)) begin
                done  <= 1'b1;
                state <= S_IDLE;
              end else bit_q <= bit_q + 1;
            end else cand_q <= cand_q + 1;
          end else begin
            tmr_q <= '0;
            state <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          cnt_a <= '0;
          cnt_b <= '0;
          tmr_q <= tmr_q + 1;
          if (tmr_q == WW'(SETTLE - 1)) begin
            tmr_q <= '0;
            state <= S_COUNT;
          end
        end
        S_COUNT: begin
          if (sync_a[1] && !sync_a[2]) cnt_a <= cnt_a + 1;
          if (sync_b[1] && !sync_b[2]) cnt_b <= cnt_b + 1;
          tmr_q <= tmr_q + 1;
          if (tmr_q == WW'(WINDOW - 1)) state <= S_CMP;
        end
        S_CMP: begin
          if (take) begin
            best_d   <= cnt_dist;
            best_bit <= cmp_bit;
            best_c   <= cand_q;
          end
          state <= S_PICK;
          if (regen_q || cand_q == KW'(K_MASK - 1)) begin
            response[bit_q] <= nb;
            if (!regen_q) mask_out[int'(bit_q) * K_MASK + int'(nc)] <= 1'b1;
            cand_q <= '0;
            if (bit_q == BW'(N_BITS - 1)) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else bit_q <= bit_q + 1;
          end else begin
            cand_q <= cand_q + 1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
