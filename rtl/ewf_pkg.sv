// ewf_pkg: shared types, schedule and register assignments of the SRV datapath
// for the fifth-order wave digital elliptic filter (EWF).
//
// The filter is computed as 34 single-cycle operations (26 additions, 8
// constant multiplications) on three adders and one multiplier, one sample
// every 16 control steps. OPS below is that schedule: the step in which each
// operation runs, its operands and its result. The operation numbers, data
// names, steps and operand arcs follow the published schedule of this
// datapath; the binding of additions to the three adders (in operation-number
// order within a step) and the multiplier coefficient numbering are this
// design's own choices.
//
// REG_TYPE1 and REG_TYPE2 map every datum to a register. Both are register
// assignments with structural robustness against delay variation (SRV):
//   type I : no register is written at the clock edge that ends a step in
//            which it is read (14 registers for this schedule),
//   type II: as type I, except that the result of the sole last reader of a
//            datum may overwrite that datum in place (12 registers).
// A conventional minimum assignment of the same schedule needs 11 registers.
// REG_MDC is such an 11-register assignment that applies the type II sharing
// wherever it can; only operations 23, 25 and 27 still have an operand
// overwritten at the edge that latches their result. They run on adders 0
// and 1, which are therefore the only units that need minimum-delay
// compensation (MDC_FU_MASK) to hold their hold constraint.
// The type I and II assignments follow the extended left-edge rule
// (lifetimes stretched by one step, sole-last-reader pairs allowed to share
// for type II), packed by an exhaustive search over the cyclic lifetimes;
// each uses the fewest registers its rule allows for this schedule.
package ewf_pkg;

  // Control steps per sample (initiation interval) and functional units.
  localparam int unsigned N_STEPS   = 16;
  localparam int unsigned N_ADDERS  = 3;
  localparam int unsigned N_FUS     = N_ADDERS + 1;   // FU index 3 is the multiplier
  localparam int unsigned MUL_FU    = N_ADDERS;
  localparam int unsigned N_COEFS   = 8;
  localparam int unsigned N_OPS     = 34;
  localparam int unsigned MAX_REGS  = 16;
  localparam int unsigned REG_IDX_W = $clog2(MAX_REGS);
  localparam int unsigned STEP_W    = $clog2(N_STEPS);

  typedef logic [REG_IDX_W-1:0] reg_idx_t;
  typedef logic [STEP_W-1:0]    step_t;

  // Every datum of one filter iteration. q is stored as dat3 and beta as
  // dat4 (the schedule writes the new state value directly), gamma is the
  // filter output.
  typedef enum logic [5:0] {
    D_INP, D_A, D_B, D_C, D_D, D_E, D_F, D_G, D_H, D_I, D_J, D_K, D_L, D_M,
    D_N, D_O, D_P, D_R, D_S, D_T, D_U, D_V, D_W, D_X, D_Y, D_Z, D_ALPHA,
    D_GAMMA, D_DAT1, D_DAT2, D_DAT3, D_DAT4, D_DAT5, D_DAT6, D_DAT7
  } data_e;
  localparam int unsigned N_DATA = 35;

  typedef enum logic {OP_ADD, OP_MUL} op_kind_e;

  typedef struct packed {
    logic [5:0] num;    // operation number of the schedule
    step_t      step;   // control step in which it executes
    logic [1:0] fu;     // 0..2 adders, 3 multiplier
    data_e      src0;
    data_e      src1;   // unused by multiplications
    logic [2:0] coef;   // multiplier coefficient index
    data_e      dst;
  } op_t;

  localparam op_t OPS [N_OPS] = '{
    '{ 1, 0, 0, D_INP,   D_DAT1, 0, D_A    },
    '{ 2, 1, 0, D_A,     D_DAT2, 0, D_B    },
    '{ 3, 1, 1, D_DAT6,  D_DAT7, 0, D_D    },
    '{ 4, 2, 0, D_B,     D_DAT3, 0, D_C    },
    '{ 5, 3, 0, D_C,     D_D,    0, D_E    },
    '{ 6, 4, 3, D_E,     D_E,    0, D_F    },
    '{ 7, 5, 0, D_F,     D_B,    0, D_G    },
    '{ 8, 5, 3, D_E,     D_E,    1, D_S    },
    '{ 9, 6, 0, D_G,     D_B,    0, D_H    },
    '{10, 6, 1, D_S,     D_D,    0, D_T    },
    '{11, 7, 3, D_H,     D_H,    2, D_I    },
    '{12, 7, 0, D_T,     D_D,    0, D_U    },
    '{13, 8, 0, D_I,     D_A,    0, D_J    },
    '{14, 8, 1, D_G,     D_E,    0, D_R    },
    '{15, 8, 3, D_U,     D_U,    3, D_V    },
    '{16, 9, 0, D_J,     D_A,    0, D_K    },
    '{17, 9, 1, D_J,     D_G,    0, D_N    },
    '{18, 9, 2, D_V,     D_DAT7, 0, D_W    },
    '{19,10, 3, D_K,     D_K,    4, D_L    },
    '{20,10, 0, D_N,     D_DAT4, 0, D_O    },
    '{21,10, 1, D_W,     D_T,    0, D_X    },
    '{22,10, 2, D_W,     D_DAT7, 0, D_ALPHA},
    '{23,11, 0, D_L,     D_INP,  0, D_M    },
    '{24,11, 3, D_O,     D_O,    5, D_P    },
    '{25,11, 1, D_X,     D_DAT5, 0, D_Y    },
    '{26,12, 0, D_M,     D_J,    0, D_DAT1 },
    '{27,12, 1, D_P,     D_DAT4, 0, D_DAT3 },
    '{28,12, 3, D_Y,     D_Y,    6, D_Z    },
    '{29,13, 0, D_DAT3,  D_O,    0, D_DAT2 },
    '{31,13, 1, D_Z,     D_DAT5, 0, D_DAT4 },
    '{32,13, 3, D_ALPHA, D_ALPHA,7, D_GAMMA},
    '{30,14, 0, D_R,     D_T,    0, D_DAT5 },
    '{33,14, 1, D_DAT4,  D_Y,    0, D_DAT6 },
    '{34,14, 2, D_GAMMA, D_W,    0, D_DAT7 }
  };

  // The input sample is loaded at the edge that ends step N_STEPS-1; the
  // output gamma is presented during step OUT_STEP.
  localparam step_t OUT_STEP = 14;

  // Register assignments, indexed by data_e.
  localparam int unsigned NREG_TYPE1 = 14;
  localparam int unsigned NREG_TYPE2 = 12;
  localparam int unsigned NREG_MDC   = 11;   // conventional minimum
  localparam logic [N_FUS-1:0] MDC_FU_MASK = 4'b0011;   // adders needing MDC with REG_MDC

  typedef int unsigned reg_map_t [N_DATA];
  //                                     inp a  b  c  d  e  f  g  h  i  j  k  l  m  n  o  p  r  s  t  u  v  w  x  y  z  al ga d1 d2 d3 d4 d5 d6 d7
  localparam reg_map_t REG_TYPE1 = '{      2, 4, 8, 5, 6, 7, 5, 9,11, 8,10,12, 7, 3,13,11,13, 6,10, 5,12,11, 8, 9,12, 2, 4,13, 9,10, 7, 0, 1,11, 3};
  localparam reg_map_t REG_TYPE2 = '{      2, 4, 8, 5, 6, 7, 5, 9, 8, 8,10, 4, 4, 4, 7, 9, 7, 6,10, 5,11,11, 8,11,11, 2, 3,10, 4, 9, 7, 0, 1,11, 3};
  localparam reg_map_t REG_MDC   = '{      0, 1, 2, 4, 3, 4, 5, 5, 2, 2, 2, 1, 1, 1, 5, 5, 8, 4, 6, 6, 3, 3, 3, 8, 0, 9, 7, 7, 1, 2, 8, 9,10, 5, 7};

  // SRV_TYPE selects the assignment: 1 = type I, 2 = type II,
  // 0 = minimum registers with MDC on the adders of MDC_FU_MASK.

  function automatic int unsigned nreg_of(int unsigned srv_type);
    return (srv_type == 1) ? NREG_TYPE1 : (srv_type == 0) ? NREG_MDC : NREG_TYPE2;
  endfunction

  function automatic int unsigned reg_of(int unsigned srv_type, data_e d);
    return (srv_type == 1) ? REG_TYPE1[d] : (srv_type == 0) ? REG_MDC[d] : REG_TYPE2[d];
  endfunction

  // Control of one functional unit for one step.
  typedef struct packed {
    logic     en;
    reg_idx_t src0;
    reg_idx_t src1;
    reg_idx_t dst;
  } fu_ctl_t;

  // Control word of one step.
  typedef struct packed {
    fu_ctl_t [N_FUS-1:0] fu;
    logic [2:0]          coef;       // multiplier coefficient select
    logic                load_inp;   // write the input sample at the end of this step
    reg_idx_t            inp_dst;
    logic                out_en;     // gamma is readable this step
    reg_idx_t            out_src;
  } ctl_t;

  // Control word of a step, derived from the schedule and an assignment.
  function automatic ctl_t build_ctl(int unsigned srv_type, step_t step);
    ctl_t c;
    c = '0;
    for (int k = 0; k < N_OPS; k++) begin
      if (OPS[k].step == step) begin
        c.fu[OPS[k].fu].en   = 1'b1;
        c.fu[OPS[k].fu].src0 = reg_idx_t'(reg_of(srv_type, OPS[k].src0));
        c.fu[OPS[k].fu].src1 = reg_idx_t'(reg_of(srv_type, OPS[k].src1));
        c.fu[OPS[k].fu].dst  = reg_idx_t'(reg_of(srv_type, OPS[k].dst));
        if (OPS[k].fu == 2'(MUL_FU)) c.coef = OPS[k].coef;
      end
    end
    c.load_inp = (step == step_t'(N_STEPS - 1));
    c.inp_dst  = reg_idx_t'(reg_of(srv_type, D_INP));
    c.out_en   = (step == OUT_STEP);
    c.out_src  = reg_idx_t'(reg_of(srv_type, D_GAMMA));
    return c;
  endfunction

endpackage
