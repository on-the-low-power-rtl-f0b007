// tdf_control: sequencer of the transposed-direct-form (TDF) filter, Schemes I and II.
//
// The coefficients sit in the coefficient memory in execution order, each with
// its stage index k. Stage k computes PCV_k(n) = h(k)x(n) + PCV_{k+1}(n-1).
// When stage k runs before stage k-1 in the order, stage k-1 still needs
// PCV_k(n-1) after stage k has produced PCV_k(n): the old value is then first
// copied to a second location (a "save transfer"), otherwise it is simply
// overwritten. Scheme I is the plain order 0..L-1, which never saves.
//
// Set-up (after cfg_start, once per coefficient set):
//   SCAN  L cycles   pos[k]  = execution position of stage k
//   PLAN  L cycles   save[k] = (k > 0) && pos[k-1] > pos[k]
//                    base[k] = k + save[1] + ... + save[k]
//   CLEAR 2L cycles  every PCVM location used is set to zero (n = -1)
// Stage k then writes PCVM[base[k]], reads PCV_{k+1}(n-1) from PCVM[base[k]+1]
// and, if save[k], first copies PCVM[base[k]] to PCVM[base[k]-1]. The location
// above the last stage is never written and reads as zero. For the order
// h(2),h(3),h(1),h(0) of a 4-tap filter this gives locations 5, 4/3, 2/1 and 0,
// seven in all. The layout rule and the set-up passes are this design's own.
//
// Per sample: READY accepts x(n) (x_valid/x_ready; x_load loads the sample
// register), STEP spends one cycle per coefficient plus one per save transfer,
// OUT puts PCVM[0] = y(n) on the read port with y_load. With x_valid held high a
// sample takes L + S + 2 cycles, S being the number of save transfers.
module tdf_control #(
  parameter int unsigned N_MAX   = fir_lp_pkg::N_MAX_DEF,
  parameter int unsigned STAGE_W = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  parameter int unsigned LEN_W   = $clog2(N_MAX + 1),
  parameter int unsigned PADDR_W = $clog2(2*N_MAX)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // set-up
  input  logic                   cfg_start,
  input  logic [LEN_W-1:0]       cfg_taps,
  output logic                   ready,       // configured and waiting for a sample
  // sample handshake
  input  logic                   x_valid,
  output logic                   x_ready,
  output logic                   x_load,
  // coefficient memory
  output logic [STAGE_W-1:0]     cmem_raddr,
  input  logic [STAGE_W-1:0]     cmem_rstage,
  // precalculated value memory
  output logic [PADDR_W-1:0]     pcvm_raddr,
  output logic [PADDR_W-1:0]     pcvm_waddr,
  output logic                   pcvm_we,
  output fir_lp_pkg::pcvm_wsel_e pcvm_wsel,
  // status
  output logic                   y_load,      // PCVM read port holds y(n)
  output logic                   mac_step,    // a multiply-add-store this cycle
  output logic                   save_step    // a save transfer this cycle
);
  import fir_lp_pkg::*;

  typedef enum logic [2:0] {
    ST_IDLE, ST_SCAN, ST_PLAN, ST_CLEAR, ST_READY, ST_STEP, ST_OUT
  } state_e;

  state_e             state;
  logic [LEN_W-1:0]   taps;
  logic [PADDR_W:0]   idx;
  logic [PADDR_W-1:0] cnt;
  logic               saved;

  logic [STAGE_W-1:0] pos_tab  [N_MAX];
  logic [PADDR_W-1:0] base_tab [N_MAX];
  logic               save_tab [N_MAX];

  logic [LEN_W-1:0]   taps_req;
  always_comb begin
    taps_req = cfg_taps;
    if (taps_req == '0) taps_req = LEN_W'(1);
    if (32'(taps_req) > N_MAX) taps_req = LEN_W'(N_MAX);
  end

  // Plan pass: stage k = idx.
  logic               plan_save;
  logic [PADDR_W-1:0] plan_base;
  always_comb begin
    plan_save = 1'b0;
    if (idx != '0 && 32'(idx) < N_MAX)
      plan_save = pos_tab[32'(idx) - 1] > pos_tab[32'(idx)];
    plan_base = PADDR_W'(idx) + cnt + PADDR_W'(plan_save);
  end

  // Step: the stage at the current execution position.
  logic               cur_save;
  logic [PADDR_W-1:0] cur_base;
  always_comb begin
    cur_save = 1'b0;
    cur_base = '0;
    if (32'(cmem_rstage) < N_MAX) begin
      cur_save = save_tab[cmem_rstage];
      cur_base = base_tab[cmem_rstage];
    end
  end

  logic last_pos;
  assign last_pos = (idx == (PADDR_W+1)'(taps - 1'b1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      taps  <= LEN_W'(1);
      idx   <= '0;
      cnt   <= '0;
      saved <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE, ST_READY: begin
          if (cfg_start) begin
            taps  <= taps_req;
            idx   <= '0;
            state <= ST_SCAN;
          end else if (state == ST_READY && x_valid) begin
            idx   <= '0;
            saved <= 1'b0;
            state <= ST_STEP;
          end
        end
        ST_SCAN: begin
          if (last_pos) begin
            idx   <= '0;
            cnt   <= '0;
            state <= ST_PLAN;
          end else idx <= idx + 1'b1;
        end
        ST_PLAN: begin
          cnt <= cnt + PADDR_W'(plan_save);
          if (last_pos) begin
            idx   <= '0;
            state <= ST_CLEAR;
          end else idx <= idx + 1'b1;
        end
        ST_CLEAR: begin
          if (idx == (PADDR_W+1)'(2*taps - 1'b1)) state <= ST_READY;
          else idx <= idx + 1'b1;
        end
        ST_STEP: begin
          if (cur_save && !saved) begin
            saved <= 1'b1;
          end else begin
            saved <= 1'b0;
            if (last_pos) state <= ST_OUT;
            else idx <= idx + 1'b1;
          end
        end
        ST_OUT: state <= ST_READY;
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Set-up tables (no reset: filled by the SCAN and PLAN passes before use).
  always_ff @(posedge clk) begin
    if (state == ST_SCAN && 32'(cmem_rstage) < N_MAX)
      pos_tab[cmem_rstage] <= STAGE_W'(idx);
    if (state == ST_PLAN && 32'(idx) < N_MAX) begin
      save_tab[idx[STAGE_W-1:0]] <= plan_save;
      base_tab[idx[STAGE_W-1:0]] <= plan_base;
    end
  end

  always_comb begin
    cmem_raddr = STAGE_W'(idx);
    pcvm_raddr = '0;
    pcvm_waddr = '0;
    pcvm_we    = 1'b0;
    pcvm_wsel  = WSEL_SUM;
    x_ready    = (state == ST_READY) && !cfg_start;
    x_load     = x_ready && x_valid;
    ready      = (state == ST_READY);
    y_load     = 1'b0;
    mac_step   = 1'b0;
    save_step  = 1'b0;
    unique case (state)
      ST_CLEAR: begin
        pcvm_we    = 1'b1;
        pcvm_waddr = PADDR_W'(idx);
        pcvm_wsel  = WSEL_ZERO;
      end
      ST_STEP: begin
        pcvm_we = 1'b1;
        if (cur_save && !saved) begin
          // situation b): keep PCV_k(n-1) for stage k-1
          pcvm_raddr = cur_base;
          pcvm_waddr = cur_base - 1'b1;
          pcvm_wsel  = WSEL_COPY;
          save_step  = 1'b1;
        end else begin
          pcvm_raddr = cur_base + 1'b1;
          pcvm_waddr = cur_base;
          pcvm_wsel  = WSEL_SUM;
          mac_step   = 1'b1;
        end
      end
      ST_OUT: begin
        pcvm_raddr = '0;
        y_load     = 1'b1;
      end
      default: ;
    endcase
  end

  // A save transfer never targets below location 0 (stage 0 never saves).
  assert property (@(posedge clk) disable iff (!rst_n) save_step |-> cur_base != '0);
  // Every stage executed belongs to the configured filter.
  assert property (@(posedge clk) disable iff (!rst_n)
                   state == ST_STEP |-> 32'(cmem_rstage) < 32'(taps));

endmodule
