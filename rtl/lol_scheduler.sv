// lol_scheduler: unified schedule table for the masked engines.
//
// For the schedule list in force and the issue step of the current
// traversal, it names the state register that each R core receives
// (IT_NONE for an idle core) and says how many issue steps the traversal has.
// Purely combinational.
//
// The lists follow the unified scheduling algorithm of the published design:
//   initialization and tag generation, both architectures:
//       S2, S1, S0, N, G            one item per step on core 0, 5 steps
//   compact, SC:   S2, S1, S0, N, G                        5 steps
//   compact, AEAD: E3, E0, E1, E2, S2, S1, S0, N, G        9 steps
//   fast, SC (cores 0..2):  core 0 S0 then N, core 1 S1 then G, core 2 S2
//   fast, AEAD (cores 0..4): core 0 E3 then S1, core 1 E2 then N,
//       core 2 E1 then S2, core 3 E0 then S0, core 4 G      2 steps
// The E-only list used while absorbing associated data and the length block
// (LIST_EABS: E3, E0, E1, E2 on the compact engine, all four in one step on
// the fast one) is this design's addition: the published schedule does not
// list those phases.
//
// Parameters: ARCH (compact or fast) and NCORES (1 for compact, 5 for fast).
module lol_scheduler
  import lol_pkg::*;
#(
  parameter arch_e       ARCH   = ARCH_FAST,
  parameter int unsigned NCORES = (ARCH == ARCH_FAST) ? 5 : 1
) (
  input  list_e                   list,
  input  logic  [3:0]             step,
  output item_e [NCORES-1:0]      item,
  output logic  [3:0]             n_steps
);

  localparam item_e INIT_SEQ [5] = '{IT_S2, IT_S1, IT_S0, IT_N, IT_G};
  localparam item_e AEAD_SEQ [9] = '{IT_E3, IT_E0, IT_E1, IT_E2, IT_S2, IT_S1, IT_S0, IT_N, IT_G};

  always_comb begin
    item    = '{default: IT_NONE};
    n_steps = 4'd5;
    if (list == LIST_INIT || (ARCH == ARCH_COMPACT && list == LIST_SC)) begin
      n_steps = 4'd5;
      if (step < 4'd5) item[0] = INIT_SEQ[step[2:0]];
    end else if (ARCH == ARCH_COMPACT) begin
      if (list == LIST_AEAD) begin
        n_steps = 4'd9;
        if (step < 4'd9) item[0] = AEAD_SEQ[step];
      end else begin
        n_steps = 4'd4;
        if (step < 4'd4) item[0] = AEAD_SEQ[step];
      end
    end else begin
      // Fast architecture; NCORES is 5, the table uses as many cores as exist.
      unique case (list)
        LIST_SC: begin
          n_steps = 4'd2;
          if (step == 4'd0) begin
            item[0] = IT_S0;
            if (NCORES > 1) item[1 % NCORES] = IT_S1;
            if (NCORES > 2) item[2 % NCORES] = IT_S2;
          end else if (step == 4'd1) begin
            item[0] = IT_N;
            if (NCORES > 1) item[1 % NCORES] = IT_G;
          end
        end
        LIST_AEAD: begin
          n_steps = 4'd2;
          if (step == 4'd0) begin
            item[0] = IT_E3;
            if (NCORES > 4) begin
              item[1 % NCORES] = IT_E2;
              item[2 % NCORES] = IT_E1;
              item[3 % NCORES] = IT_E0;
              item[4 % NCORES] = IT_G;
            end
          end else if (step == 4'd1) begin
            item[0] = IT_S1;
            if (NCORES > 4) begin
              item[1 % NCORES] = IT_N;
              item[2 % NCORES] = IT_S2;
              item[3 % NCORES] = IT_S0;
            end
          end
        end
        default: begin  // LIST_EABS
          n_steps = 4'd1;
          if (step == 4'd0) begin
            item[0] = IT_E3;
            if (NCORES > 4) begin
              item[1 % NCORES] = IT_E2;
              item[2 % NCORES] = IT_E1;
              item[3 % NCORES] = IT_E0;
            end
          end
        end
      endcase
    end
  end

endmodule
