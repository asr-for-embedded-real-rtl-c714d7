// Shared constants and types of the GMM emission-probability accelerator.
//
// The accelerator evaluates, for one HMM state j and one observation vector o_t,
//   log b_jm = C_jm + g_jm + sum_d (o_d - mu_jmd)^2 * v_jmd        (per mixture m)
//   log b_j  = (((log b_j1 (+) log b_j2) (+) ...) (+) log b_jM)      (log-add)
// with D = 39 feature dimensions, M = 4 mixtures per state and 16-bit fixed-point
// data, the configuration of the Resource Management task the design was sized for.
//
// Fixed-point formats (this design's choice; only "16-bit fixed point" is given):
//   o, mu      : signed 16 bit, FEAT_FRAC = 8 fraction bits
//   v          : signed 16 bit, VAR_FRAC  = 8 fraction bits (v = -1/(2 sigma^2) <= 0)
//   C, g, log b: signed 16 bit, LOG_FRAC  = 3 fraction bits (natural log)
//
// Memory layout of one HMM state (this design's choice). Each state occupies 320 bytes
// in SRAM (mu and C) and 320 bytes in SDRAM (v and g), 640 bytes in all. Mixture m
// starts at byte offset 80*m of the block. It holds 40 halfwords: dimension
// 0..38 first, then the constant. Halfword k of a 32-bit word is bits [16k+15:16k]
// (little endian). The observation vector is 39 halfwords (78 bytes) in SDRAM.
package asr_gmm_pkg;

  localparam int unsigned D_DIM      = 39;  // feature dimensions
  localparam int unsigned M_MIX      = 4;   // Gaussian mixtures per HMM state
  localparam int unsigned N_LANES    = 3;   // parallel computation units
  localparam int unsigned DATA_W     = 16;  // fixed-point word width
  localparam int unsigned BUS_W      = 32;  // Avalon data width
  localparam int unsigned ADDR_W     = 32;  // Avalon byte address width
  localparam int unsigned FEAT_FRAC  = 8;
  localparam int unsigned VAR_FRAC   = 8;
  localparam int unsigned LOG_FRAC   = 3;
  localparam int unsigned LOGADD_TH  = 16;  // log-add threshold on |x - y|
  localparam int unsigned ACC_W      = 32;  // accumulator width of the log domain

  // Avalon-MM read master request and response.
  typedef struct packed {
    logic [ADDR_W-1:0] address;
    logic              read;
  } avm_req_t;

  typedef struct packed {
    logic [BUS_W-1:0] readdata;
    logic             waitrequest;
    logic             readdatavalid;
  } avm_rsp_t;

  // Work order of one HMM state: base byte addresses of its two parameter blocks.
  typedef struct packed {
    logic [ADDR_W-1:0] sram_base;   // mu, C
    logic [ADDR_W-1:0] sdram_base;  // v, g
  } state_cmd_t;

  // Register word addresses of the host (processor) slave port.
  typedef enum logic [2:0] {
    REG_STATUS     = 3'd0,
    REG_OBS_ADDR   = 3'd1,
    REG_SRAM_BASE  = 3'd2,
    REG_SDRAM_BASE = 3'd3,
    REG_RESULT     = 3'd4
  } host_reg_e;

  // Saturate a wide signed value to DATA_W bits.
  function automatic logic signed [DATA_W-1:0] sat16(input logic signed [ACC_W+1:0] x);
    localparam logic signed [ACC_W+1:0] MAXV = (ACC_W+2)'(2**(DATA_W-1) - 1);
    localparam logic signed [ACC_W+1:0] MINV = -(ACC_W+2)'(2**(DATA_W-1));
    if (x > MAXV)      return DATA_W'(MAXV);
    else if (x < MINV) return DATA_W'(MINV);
    else               return DATA_W'(x);
  endfunction

endpackage
