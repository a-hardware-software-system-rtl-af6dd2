// sr_pkg: types and constants shared by the signal reconstruction kernel.
//
// A sample, a weight and a result are complex IEEE-754 single precision
// numbers. Every SRAM bank delivers one 32-bit word per cycle, so one bank
// holds real parts and a second bank imaginary parts of the same sensors.
// The sizes below are those of the target board: four 2 MB SRAM banks
// (512K words of 32 bits each) and blockRAM sized for up to 1024 sensors (the
// MAX_SENSORS parameter of the kernel).
// Widths of the beam offsets (16 bits) follow from the stated blockRAM
// budget of 16 bits per sensor; the register map is this design's own.
package sr_pkg;

  typedef logic [31:0] f32_t;

  typedef struct packed {
    f32_t re;
    f32_t im;
  } cplx_t;

  // Board memory sizes
  localparam int unsigned SRAM_BYTES  = 2 * 1024 * 1024;
  localparam int unsigned SRAM_WORDS  = SRAM_BYTES / 4;
  localparam int unsigned SRAM_AW     = $clog2(SRAM_WORDS);   // 19
  localparam int unsigned IDX_W       = 16;                   // beam offset width
  localparam int unsigned DRAM_AW     = 24;                   // result word address

  // Host control word map (word addresses on the control bus)
  localparam logic [2:0] REG_CTRL      = 3'd0;  // bit0 start (self clearing), bit1 soft reset
  localparam logic [2:0] REG_STATUS    = 3'd1;  // bit0 done, bit1 busy (read only)
  localparam logic [2:0] REG_SENSORS   = 3'd2;  // number of sensors (even, 2..1024)
  localparam logic [2:0] REG_STEPS     = 3'd3;  // time steps to reconstruct in this pass
  localparam logic [2:0] REG_PARTSIZE  = 3'd4;  // SRAM words per sensor partition
  localparam logic [2:0] REG_RESBASE   = 3'd5;  // first DRAM word address of the results

  // IEEE-754 single precision fields
  localparam f32_t F32_QNAN = 32'h7FC0_0000;

  function automatic logic f32_is_nan(f32_t x);
    return (x[30:23] == 8'hFF) && (x[22:0] != '0);
  endfunction

  function automatic logic f32_is_inf(f32_t x);
    return (x[30:23] == 8'hFF) && (x[22:0] == '0);
  endfunction

  // Zero or subnormal: both are treated as zero (flush to zero)
  function automatic logic f32_is_zero(f32_t x);
    return x[30:23] == 8'h00;
  endfunction

endpackage
