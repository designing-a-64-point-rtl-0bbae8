// mcsm: control unit of the FFT processor, a counter-driven state machine
// that produces every control signal of the data path for one transform.
//
// Schedule. The 64-point radix-2 decimation-in-frequency transform (six
// butterfly levels) is done as two passes of eight 8-point groups; within a
// group the three levels of 4 butterflies each run on a register bank. Groups
// are taken in pairs (A in register bank 1, B in register bank 2) and the
// 24 butterflies of a pair are interleaved as
//   slots  0- 3 A level 0,  4- 7 B level 0,   8-11 A level 1,
//   slots 12-15 B level 1, 16-19 A level 2,  20-23 B level 2,
// so a result is never needed earlier than 3 cycles after its butterfly
// started (2 pipeline stages plus write-back). One butterfly is issued per
// cycle, 192 in all. Relative to the first slot r = 0 of pair p:
//   r = 3   load group B of pair p          (memory -> register bank 2)
//   r = 22  store group A                   (register bank 1 -> memory)
//   r = 23  load group A of pair p+1
//   r = 2   of pair p+1: store group B of pair p
// At the pass boundary (pair 3, r = 23) the first row of pass 1 is loaded
// while the last column of pass 0 is still in register bank 2: its one
// sample in that row (sample 7, register 0 of bank 2, finished at r = 22)
// is forwarded into the load (bypass) instead of being read from memory, so
// pass 1 starts without a wait. The last pair ends with the store of B at
// r = 26. Loads and stores never fall in the same cycle. Including one
// preload cycle the transform takes 1 + 7*24 + 27 = 196 cycles; done_fft
// rises on the next edge and stays high until the next start.
//
// Interface: en_fft (one-cycle pulse, or held) clears all counters and
// (re)starts the transform; busy is high while it runs. mem_load / load_sel
// and mem_store / store_sel move a group between memory and register bank
// 1 (sel 0) or 2 (sel 1); bypass marks the pass-boundary load. issue starts
// a butterfly on register bank in_sel with operands rs1 / rs2 and twiddle
// exponent e = 8*csdb2 + csdb1. wb_valid, wb_sel, wb_idx1, wb_idx2 are the
// same selects delayed by the butterfly latency and steer the write-back.
//
// en_fft, done_fft, the counter-based state generation, the two register
// banks and the 196-cycle count follow the processor description; the
// pairing, the slot order and the forwarding that makes 196 cycles possible
// are this design's (the description gives no schedule).
module mcsm
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en_fft,
  output logic       busy,
  output logic       done_fft,
  output logic       mem_load,
  output logic       load_sel,
  output logic       mem_store,
  output logic       store_sel,
  output logic       issue,
  output logic       in_sel,
  output addr_t      rs1,
  output addr_t      rs2,
  output logic [2:0] csdb1,
  output logic [1:0] csdb2,
  output logic       wb_valid,
  output logic       wb_sel,
  output addr_t      wb_idx1,
  output addr_t      wb_idx2,
  output logic       bypass       // pass-boundary load: sample 7 forwarded from bank 2
);

  typedef enum logic [1:0] {S_IDLE, S_PRELOAD, S_RUN, S_DONE} state_t;

  state_t     state;
  logic [2:0] pair;   // pair of groups, 0..3 pass 0, 4..7 pass 1
  logic [4:0] rel;    // cycle within the pair

  logic [4:0] last_rel;
  always_comb begin
    if (pair == 3'd7) last_rel = 5'd26;
    else              last_rel = 5'd23;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      pair  <= '0;
      rel   <= '0;
    end else if (en_fft) begin
      state <= S_PRELOAD;
      pair  <= '0;
      rel   <= '0;
    end else begin
      case (state)
        S_PRELOAD: state <= S_RUN;
        S_RUN: begin
          if (rel == last_rel) begin
            rel <= '0;
            if (pair == 3'd7) state <= S_DONE;
            else              pair  <= pair + 3'd1;
          end else begin
            rel <= rel + 5'd1;
          end
        end
        default: ;
      endcase
    end
  end

  assign busy     = (state == S_PRELOAD) || (state == S_RUN);
  assign done_fft = (state == S_DONE);

  // ---- memory transfers ----------------------------------------------------
  logic run;
  assign run = (state == S_RUN);

  logic load_a, load_b, store_a, store_b;
  always_comb begin
    load_a  = (state == S_PRELOAD) || (run && rel == 5'd23 && pair != 3'd7);
    load_b  = run && rel == 5'd3;
    store_a = run && rel == 5'd22;
    store_b = (run && rel == 5'd2 && pair != 3'd0)
           || (run && rel == 5'd26 && pair == 3'd7);
  end

  assign mem_load   = load_a || load_b;
  assign load_sel   = load_b;
  assign mem_store  = store_a || store_b;
  assign store_sel  = store_b;
  assign bypass     = run && pair == 3'd3 && rel == 5'd23;

  // ---- butterfly issue -------------------------------------------------------
  logic [1:0] level;
  logic [1:0] j;
  logic       pass;
  logic [2:0] grp;
  logic [4:0] e;

  always_comb begin
    issue = run && rel < 5'd24;
    level = rel[4:3];                 // 0..2 while issuing
    in_sel = rel[2];
    j     = rel[1:0];
    pass  = pair[2];
    grp   = {pair[1:0], rel[2]};
    // butterfly operand pairs inside the group, spans 4, 2, 1
    case (level)
      2'd0:    begin rs1 = {1'b0, j};        rs2 = {1'b1, j};        end
      2'd1:    begin rs1 = {j[1], 1'b0, j[0]}; rs2 = {j[1], 1'b1, j[0]}; end
      default: begin rs1 = {j, 1'b0};        rs2 = {j, 1'b1};        end
    endcase
    // twiddle exponent of W64 for the upper operand's position
    if (!pass) begin
      case (level)
        2'd0:    e = {j, grp};                     // g + 8j
        2'd1:    e = {rs1[0], grp, 1'b0};          // 2g + 16*(q mod 2)
        default: e = {grp, 2'b00};                 // 4g
      endcase
    end else begin
      case (level)
        2'd0:    e = {j, 3'b000};                  // 8q
        2'd1:    e = {rs1[0], 4'b0000};            // 16*(q mod 2)
        default: e = 5'd0;
      endcase
    end
    csdb1 = e[2:0];
    csdb2 = e[4:3];
  end

  // ---- delayed selects for the write-back (butterfly latency) ---------------
  logic       d_valid [BF_LAT];
  logic       d_sel   [BF_LAT];
  addr_t      d_idx1  [BF_LAT];
  addr_t      d_idx2  [BF_LAT];

  always_ff @(posedge clk) begin
    if (rst || en_fft) begin
      for (int i = 0; i < BF_LAT; i++) begin
        d_valid[i] <= 1'b0;
        d_sel[i]   <= 1'b0;
        d_idx1[i]  <= '0;
        d_idx2[i]  <= '0;
      end
    end else begin
      d_valid[0] <= issue;
      d_sel[0]   <= in_sel;
      d_idx1[0]  <= rs1;
      d_idx2[0]  <= rs2;
      for (int i = 1; i < BF_LAT; i++) begin
        d_valid[i] <= d_valid[i-1];
        d_sel[i]   <= d_sel[i-1];
        d_idx1[i]  <= d_idx1[i-1];
        d_idx2[i]  <= d_idx2[i-1];
      end
    end
  end

  assign wb_valid = d_valid[BF_LAT-1];
  assign wb_sel   = d_sel[BF_LAT-1];
  assign wb_idx1  = d_idx1[BF_LAT-1];
  assign wb_idx2  = d_idx2[BF_LAT-1];

  a_no_load_and_store: assert property (@(posedge clk) disable iff (rst) !(mem_load && mem_store))
    else $error("mcsm: memory read and write in the same cycle");

endmodule
