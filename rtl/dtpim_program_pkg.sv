// dtpim_program_pkg: the program and the constant table that make the
// processor simulate the dual three-phase induction machine (DTPIM).
//
// The program is the loop of the simulation algorithm:
//   wait for the sampling instant; store the six measured leg duty cycles
//   and the load torque; compute the six phase voltages and their (alpha,
//   beta) components; compute the electromagnetic torque; predict the
//   state (stator and rotor alpha/beta currents) and the rotor speed one
//   step ahead with the forward-Euler model; send the present state, speed,
//   torque and phase voltages to the output module; update the state; loop.
//
// Model (x = [i_as_alpha, i_s_beta, i_r_alpha, i_r_beta], u = [u_alpha, u_beta, 0, 0]):
//   x(k+1) = (I + Tm*A(w)) x(k) + Tm*B u(k)
//   Te(k)  = (3P/2) * Lm * (i_s_beta*i_r_alpha - i_s_alpha*i_r_beta)
//   w(k+1) = (1 - Tm*Bi/Ji) w(k) + Tm*P/(2Ji) * (Te(k) - TL)
// with c1 = Ls*Lr - Lm^2, c2 = Lr/c1, c3 = Lm/c1, c4 = Ls/c1 and A, B the
// usual induction machine matrices in stationary (alpha, beta) coordinates.
// Phase voltages come from the leg duty cycles d_x of each isolated-neutral
// three-phase set: v_a = Vdc/3 * (2 d_a - d_b - d_c), and so on.
// (u_alpha, u_beta) are the first two rows of the amplitude-invariant 6x6
// vector space decomposition, phase axes at 0 (a), 30 (d), 120 (b),
// 150 (e), 240 (c) and 270 (f) electrical degrees.
//
// Machine data (15 kW machine, 3 pole pairs) and the 40.96 us step are the
// published ones; the torque expression is written with the rotor fluxes
// expanded (a cross product), and the sign of the w*Lm coupling in the third
// row of A is the one that makes A consistent with the fourth row.
// The memory map and the order of operations are this design's own.
package dtpim_program_pkg;
  import dtpim_pkg::*;

  // ---- machine and drive data -------------------------------------------
  localparam real RS  = 0.62;      // stator resistance, ohm
  localparam real RR  = 0.63;      // rotor resistance, ohm
  localparam real LS  = 0.2062;    // stator inductance, H
  localparam real LR  = 0.2033;    // rotor inductance, H
  localparam real LM  = 0.0666;    // magnetising inductance, H
  localparam real JI  = 0.27;      // inertia, kg m^2
  localparam real BI  = 0.012;     // viscous friction
  localparam real PP  = 3.0;       // P, pairs of poles
  localparam real TM  = 40.96e-6;  // simulation step, s (default)
  localparam real T_CLK_SIM = 20e-9; // processor clock period, s
  localparam real VDC = 585.0;     // dc-link voltage, V

  localparam real C1 = LS * LR - LM * LM;
  localparam real C2 = LR / C1;
  localparam real C3 = LM / C1;
  localparam real C4 = LS / C1;

  // ---- data memory map ----------------------------------------------------
  // constants
  localparam int A11 = 0,  A13 = 1,  A12W = 2, A14W = 3, B1 = 4;
  localparam int A31 = 5,  A33 = 6,  A32W = 7, A34W = 8, B3 = 9;
  localparam int CTE = 10, W1 = 11, W2 = 12, VDC3 = 13;
  localparam int HALF = 14, S32 = 15, THIRD = 16;
  localparam int N_CONST = 17;
  // state
  localparam int X1 = 32, X2 = 33, X3 = 34, X4 = 35, WR = 36, TE = 37;
  // inputs
  localparam int DA = 40, DB = 41, DC = 42, DD = 43, DE = 44, DF = 45, TL = 46;
  // phase voltages and (alpha, beta) voltages
  localparam int VA = 48, VB = 49, VC = 50, VD = 51, VE = 52, VF = 53;
  localparam int UA = 54, UB = 55;
  // temporaries and next state
  localparam int T1 = 56, T2 = 57, T3 = 58, P = 59, Q = 60;
  localparam int K12 = 61, K14 = 62, K32 = 63, K34 = 64;
  localparam int N1 = 65, N2 = 66, N3 = 67, N4 = 68, NW = 69;

  // Words sent per step by the output module:
  // X1 X2 X3 X4 WR TE VA VB VC VD VE VF (the last one closes the record).

  // Value of each constant, for a simulation step of tm seconds.
  function automatic real const_value(int addr, real tm);
    case (addr)
      A11:   return 1.0 - tm * C2 * RS;
      A13:   return tm * C3 * RR;
      A12W:  return tm * C3 * LM;
      A14W:  return tm * C3 * LR;
      B1:    return tm * C2;
      A31:   return tm * C3 * RS;
      A33:   return 1.0 - tm * C4 * RR;
      A32W:  return tm * C4 * LM;
      A34W:  return tm * C4 * LR;
      B3:    return tm * C3;
      CTE:   return 1.5 * PP * LM;
      W1:    return 1.0 - tm * BI / JI;
      W2:    return tm * PP / (2.0 * JI);
      VDC3:  return VDC / 3.0;
      HALF:  return 0.5;
      S32:   return 0.8660254037844386;
      THIRD: return 1.0 / 3.0;
      default: return 0.0;
    endcase
  endfunction

  // Initial content of a data memory word: constants, everything else 0.
  function automatic word_t data_init(int addr, real tm = TM);
    if (addr < N_CONST) return real_to_f32(const_value(addr, tm));
    return '0;
  endfunction

  typedef logic [INSTR_W-1:0] prog_image_t [DEPTH];

  // The program image.
  function automatic prog_image_t program_image();
    prog_image_t img;
    addr_t n;
    int phase_v [6];
    int phase_d [6][3];
    for (int i = 0; i < DEPTH; i++) img[i] = mk_instr(OP_NOP, 0, 0, 0);
    n = 0;
    // 0: wait for the sampling instant
    img[n++] = mk_instr(OP_WAIT, 0, 0, 0);
    // store the inputs: duties a..f and load torque
    for (int c = 0; c < 6; c++) img[n++] = mk_instr(OP_IN, DA + c, c, 0);
    img[n++] = mk_instr(OP_IN, TL, int'(IN_CH_TL), 0);
    // phase voltages, v_x = Vdc/3 (2 d_x - d_y - d_z) within each set
    phase_v = '{VA, VB, VC, VD, VE, VF};
    phase_d = '{'{DA, DB, DC}, '{DB, DC, DA}, '{DC, DA, DB},
                '{DD, DE, DF}, '{DE, DF, DD}, '{DF, DD, DE}};
    for (int k = 0; k < 6; k++) begin
      img[n++] = mk_instr(OP_ADD, T1, phase_d[k][0], phase_d[k][0]);
      img[n++] = mk_instr(OP_SUB, T1, T1, phase_d[k][1]);
      img[n++] = mk_instr(OP_SUB, T1, T1, phase_d[k][2]);
      img[n++] = mk_instr(OP_MUL, phase_v[k], T1, VDC3);
    end
    // u_alpha = 1/3 (v_a - (v_b + v_c)/2 + sqrt3/2 (v_d - v_e))
    img[n++] = mk_instr(OP_ADD, T1, VB, VC);
    img[n++] = mk_instr(OP_MUL, T1, T1, HALF);
    img[n++] = mk_instr(OP_SUB, T2, VA, T1);
    img[n++] = mk_instr(OP_SUB, T3, VD, VE);
    img[n++] = mk_instr(OP_MUL, T3, T3, S32);
    img[n++] = mk_instr(OP_ADD, T2, T2, T3);
    img[n++] = mk_instr(OP_MUL, UA, T2, THIRD);
    // u_beta = 1/3 (sqrt3/2 (v_b - v_c) + (v_d + v_e)/2 - v_f)
    img[n++] = mk_instr(OP_SUB, T1, VB, VC);
    img[n++] = mk_instr(OP_MUL, T1, T1, S32);
    img[n++] = mk_instr(OP_ADD, T2, VD, VE);
    img[n++] = mk_instr(OP_MUL, T2, T2, HALF);
    img[n++] = mk_instr(OP_ADD, T1, T1, T2);
    img[n++] = mk_instr(OP_SUB, T1, T1, VF);
    img[n++] = mk_instr(OP_MUL, UB, T1, THIRD);
    // torque
    img[n++] = mk_instr(OP_MUL, T1, X2, X3);
    img[n++] = mk_instr(OP_MUL, T2, X1, X4);
    img[n++] = mk_instr(OP_SUB, T1, T1, T2);
    img[n++] = mk_instr(OP_MUL, TE, T1, CTE);
    // speed-dependent entries of Tm*A
    img[n++] = mk_instr(OP_MUL, K12, A12W, WR);
    img[n++] = mk_instr(OP_MUL, K14, A14W, WR);
    img[n++] = mk_instr(OP_MUL, K32, A32W, WR);
    img[n++] = mk_instr(OP_MUL, K34, A34W, WR);
    // row 1: A11 x1 + K12 x2 + A13 x3 + K14 x4 + B1 u_alpha
    img[n++] = mk_instr(OP_MUL, P, A11, X1);
    img[n++] = mk_instr(OP_MUL, Q, K12, X2);
    img[n++] = mk_instr(OP_ADD, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, A13, X3);
    img[n++] = mk_instr(OP_ADD, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, K14, X4);
    img[n++] = mk_instr(OP_ADD, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, B1, UA);
    img[n++] = mk_instr(OP_ADD, N1, P, Q);
    // row 2: -K12 x1 + A11 x2 - K14 x3 + A13 x4 + B1 u_beta
    img[n++] = mk_instr(OP_MUL, P, A11, X2);
    img[n++] = mk_instr(OP_MUL, Q, K12, X1);
    img[n++] = mk_instr(OP_SUB, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, K14, X3);
    img[n++] = mk_instr(OP_SUB, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, A13, X4);
    img[n++] = mk_instr(OP_ADD, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, B1, UB);
    img[n++] = mk_instr(OP_ADD, N2, P, Q);
    // row 3: A31 x1 - K32 x2 + A33 x3 - K34 x4 - B3 u_alpha
    img[n++] = mk_instr(OP_MUL, P, A33, X3);
    img[n++] = mk_instr(OP_MUL, Q, A31, X1);
    img[n++] = mk_instr(OP_ADD, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, K32, X2);
    img[n++] = mk_instr(OP_SUB, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, K34, X4);
    img[n++] = mk_instr(OP_SUB, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, B3, UA);
    img[n++] = mk_instr(OP_SUB, N3, P, Q);
    // row 4: K32 x1 + A31 x2 + K34 x3 + A33 x4 - B3 u_beta
    img[n++] = mk_instr(OP_MUL, P, A33, X4);
    img[n++] = mk_instr(OP_MUL, Q, K32, X1);
    img[n++] = mk_instr(OP_ADD, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, A31, X2);
    img[n++] = mk_instr(OP_ADD, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, K34, X3);
    img[n++] = mk_instr(OP_ADD, P, P, Q);
    img[n++] = mk_instr(OP_MUL, Q, B3, UB);
    img[n++] = mk_instr(OP_SUB, N4, P, Q);
    // speed
    img[n++] = mk_instr(OP_SUB, P, TE, TL);
    img[n++] = mk_instr(OP_MUL, P, P, W2);
    img[n++] = mk_instr(OP_MUL, Q, W1, WR);
    img[n++] = mk_instr(OP_ADD, NW, P, Q);
    // send x(k|k-1), speed, torque and phase voltages
    img[n++] = mk_instr(OP_OUT, 0, X1, 0);
    img[n++] = mk_instr(OP_OUT, 0, X2, 0);
    img[n++] = mk_instr(OP_OUT, 0, X3, 0);
    img[n++] = mk_instr(OP_OUT, 0, X4, 0);
    img[n++] = mk_instr(OP_OUT, 0, WR, 0);
    img[n++] = mk_instr(OP_OUT, 0, TE, 0);
    for (int k = 0; k < 5; k++) img[n++] = mk_instr(OP_OUT, 0, phase_v[k], 0);
    img[n++] = mk_instr(OP_OUTL, 0, VF, 0);
    // update the state for the next iteration
    img[n++] = mk_instr(OP_MOV, X1, N1, 0);
    img[n++] = mk_instr(OP_MOV, X2, N2, 0);
    img[n++] = mk_instr(OP_MOV, X3, N3, 0);
    img[n++] = mk_instr(OP_MOV, X4, N4, 0);
    img[n++] = mk_instr(OP_MOV, WR, NW, 0);
    img[n++] = mk_instr(OP_JMP, 0, 0, 0);
    return img;
  endfunction

endpackage
