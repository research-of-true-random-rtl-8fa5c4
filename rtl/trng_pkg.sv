// trng_pkg: constants shared by the PLL-jitter TRNG.
//
// The register map follows the 16-bit peripheral layout of this TRNG: the data
// register sits at word offset 0 and the status (read) / control (write)
// register at word offset 1.  Status bit 0 is V (valid word waiting), status
// bit 2 is C (clocks proper), control bit 0 is IE (interrupt enable).  All
// other bits are undefined by the design and read as zero here.
//
// K_M and K_D are the multiplication and division factors that relate CLJ to
// CLK: F_CLJ = F_CLK * K_M / K_D with GCD(K_M, K_D) = 1.  One random bit is
// produced every K_D periods of CLK (T_Q = K_D * T_CLK = K_M * T_CLJ).
package trng_pkg;

  timeunit 1ns;
  timeprecision 1fs;

  // Frequency relation of the main configuration: 1120 = 80*14, 3333 = 11*101*3.
  localparam int unsigned K_M_DEFAULT = 1120;
  localparam int unsigned K_D_DEFAULT = 3333;

  // Width of the data register (16-bit variant; 32 is the other variant).
  localparam int unsigned DATA_W_DEFAULT = 16;

  // Word offsets of the two registers.
  localparam logic ADDR_DATA = 1'b0;
  localparam logic ADDR_CSR  = 1'b1;

  // Bit positions inside the status and control registers.
  localparam int unsigned STATUS_V_BIT = 0;
  localparam int unsigned STATUS_C_BIT = 2;
  localparam int unsigned CTRL_IE_BIT  = 0;

  // Status word as a packed struct (16-bit view, upper bits zero).
  typedef struct packed {
    logic [12:0] rsvd;   // undefined, read as 0
    logic        c;      // 1 = proper clocks
    logic        rsvd1;  // undefined, read as 0
    logic        v;      // 1 = valid data in the data register
  } status16_t;

endpackage
