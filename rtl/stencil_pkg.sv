// stencil_pkg: types and constants shared by the stencil accelerators.
//
// The accelerators in this library follow one pattern: a chain of processing
// elements (PEs), one per time step, each made of a FIFO-and-register custom
// buffer that turns a stream of grid words into a full neighbourhood window,
// and a computing unit (CU) that evaluates the stencil on that window.
// This package holds the kernel selector, the AXI constants and the default
// sizes that several modules share.
package stencil_pkg;

  // Stencil kernel evaluated by a general stencil PE.
  typedef enum logic [1:0] {
    KERN_LAPLACE = 2'd0,   // 4-point Laplace / Jacobi update, 0.25*(U+D+L+R)
    KERN_SOBEL   = 2'd1    // Sobel 2D edge filter, |Gx|+|Gy|
  } kernel_e;

  // AXI3 (HBM pseudo-channel port) constants.
  localparam int unsigned AXI_LEN_W     = 4;    // AXI3 AxLEN field width
  localparam int unsigned AXI3_MAX_BEAT = 16;   // longest AXI3 burst
  localparam int unsigned HBM_DATA_W    = 512;  // FPGA-side width of one channel
  localparam int unsigned HBM_ADDR_W    = 33;   // 8 GiB of HBM, byte address

  // Number of cells packed in one stream word.
  function automatic int unsigned cells(input int unsigned px, input int unsigned py);
    return px * py;
  endfunction

  // Ceiling division used for words-per-row and band counts.
  function automatic int unsigned cdiv(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
