// ddpm_pkg: constants and types shared by the DDPMnet accelerator.
//
// The accelerator multiplies by counting: an input feature X is sent to the
// MAC array as a dyadic digital pulse modulated (DDPM) bit stream of density
// X/2^N, a weight W is the number of cycles during which a MAC unit counts
// that stream, and the sign of W selects up or down counting. The array is
// 27 rows x 30 columns, fed by 27 x 2 modulators; every column receives one
// 4-bit instruction per cycle from the program memory.
//
// Sizes printed with the architecture (27x30 array, 27x2 modulators, 12-bit
// counter, 4-bit instruction, 6-bit dX / 4-bit dY displacements, three input
// banks of 28.5 Kb, 18 Kb program memory) follow the source design. The
// feature width N, the instruction encoding, the control fields of the
// program word and the memory geometries are this implementation's choices.
package ddpm_pkg;

  // ---- array geometry ------------------------------------------------------
  parameter int unsigned ROWS  = 27;  // MAC rows (one input feature per row)
  parameter int unsigned COLS  = 30;  // MAC columns (one kernel per column)
  parameter int unsigned MODS  = 2;   // DDPM modulators per row
  parameter int unsigned FW    = 8;   // input feature width N (chosen)
  parameter int unsigned CNT_W = 12;  // MAC counter / output register width
  parameter int unsigned OP_W  = 4;   // MAC instruction width

  // ---- program memory -----------------------------------------------------
  parameter int unsigned DUR_W    = 8;    // word hold time field: dur+1 cycles
  parameter int unsigned PM_DEPTH = 140;  // 140 x 132 bit = 18.05 Kb
  parameter int unsigned PM_AW    = $clog2(PM_DEPTH);

  // ---- input feature memory -----------------------------------------------
  parameter int unsigned NBANKS     = 3;
  parameter int unsigned XDIM       = 27;  // x extent of a bank (words)
  parameter int unsigned YDIM       = 5;   // y extent of a bank (words)
  parameter int unsigned BANK_DEPTH = XDIM * YDIM;  // 135 words x 27 x 8 b = 28.5 Kb
  parameter int unsigned BANK_AW    = $clog2(BANK_DEPTH);
  parameter int unsigned DX_W       = 6;   // signed x displacement
  parameter int unsigned DY_W       = 4;   // signed y displacement
  parameter int unsigned DM_DEPTH   = 512; // displacement list entries
  parameter int unsigned DM_AW      = $clog2(DM_DEPTH);

  // ---- MAC instruction encoding (4 bits) ----------------------------------
  //   0 s dd : count the pulse stream selected by dd, up (s=0) or down (s=1);
  //            dd >= MODS selects a constant 1 (one count per cycle, bias)
  //   1000   : NOP, hold the counter
  //   1001   : CLR, clear the counter
  //   1010   : STORE_RELU, output register <= max(counter, 0)
  //   1011   : STORE, output register <= counter
  //   11xx   : reserved, behaves as NOP
  typedef logic [OP_W-1:0] mac_op_t;
  localparam mac_op_t OP_NOP        = 4'b1000;
  localparam mac_op_t OP_CLR        = 4'b1001;
  localparam mac_op_t OP_STORE_RELU = 4'b1010;
  localparam mac_op_t OP_STORE      = 4'b1011;

  function automatic mac_op_t op_count(logic down, logic [1:0] sel);
    return {1'b0, down, sel};
  endfunction

  // ---- program word control fields ----------------------------------------
  // Besides one instruction per column, each program word carries:
  //   halt : stop after this word
  //   rot  : rotate the input banks when this word starts
  //   ld   : ld[k] reloads modulator k of every row when this word starts
  //   dur  : the word is executed for dur+1 cycles
  typedef struct packed {
    logic             halt;
    logic             rot;
    logic [MODS-1:0]  ld;
    logic [DUR_W-1:0] dur;
  } pm_ctrl_t;

  // one entry of the displacement list
  typedef struct packed {
    logic signed [DX_W-1:0] dx;
    logic signed [DY_W-1:0] dy;
  } disp_t;

  // read pointer of one modulator port into its bank
  typedef struct packed {
    logic [DY_W-1:0] y;
    logic [DX_W-1:0] x;
  } ptr_t;

endpackage
