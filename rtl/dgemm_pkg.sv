// dgemm_pkg: types and default sizes shared by the matrix-multiplication
// accelerator. The operand stream that runs from the master through the
// linear chain of processing elements is one slot_t per clock: an element of
// A (tagged with the PE row that must keep it) and an element of B (tagged
// with its column inside the C block and with the first/last-k flags that
// start and finish an accumulation). Results travel back along the chain as
// result_t words tagged with their row and column inside the C block.
package dgemm_pkg;
  import fp64_pkg::*;

  // 14 PEs per StratixII 60 is the size the source reports for the complete
  // FPGA design; the 64-bit MAC has 14 pipeline stages.
  localparam int unsigned NUM_PE_DEF  = 14;
  localparam int unsigned MAC_STAGES  = 14;
  // Split of the 14 MAC stages between multiplier and adder (own choice).
  localparam int unsigned MUL_LAT_DEF = 6;
  localparam int unsigned ADD_LAT_DEF = MAC_STAGES - MUL_LAT_DEF;
  // Width Sj of a C block, i.e. the number of partial sums each PE keeps
  // (own choice: must exceed the adder latency and be at least NUM_PE).
  localparam int unsigned SJ_DEF      = 32;

  localparam int unsigned ROW_W  = 8;   // row tag: up to 256 PEs
  localparam int unsigned COL_W  = 8;   // column tag: Sj up to 256
  localparam int unsigned ADDR_W = 28;  // 64-bit word address on the board

  typedef logic [ADDR_W-1:0] waddr_t;

  typedef struct packed {
    logic             a_valid;  // an element of A is in this slot
    logic [ROW_W-1:0] a_row;    // PE (row of the C block) that keeps it
    fp64_t            a;
    logic             b_valid;  // an element of B is in this slot
    logic [COL_W-1:0] b_col;    // column of the C block it contributes to
    logic             k_first;  // first term of the dot products
    logic             k_last;   // last term: the sums are final
    fp64_t            b;
  } slot_t;

  typedef struct packed {
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
    fp64_t            data;
  } result_t;

  // Configuration written by the host through the control registers.
  typedef struct packed {
    logic [31:0] n;           // inner dimension (columns of A, rows of B)
    logic [31:0] num_blocks;  // C blocks of NUM_PE x Sj to compute
    waddr_t      a_base;      // first word of the rearranged A stream
    waddr_t      b_base;      // first word of the rearranged B stream
    waddr_t      c_base;      // first word of the C result area
  } dgemm_cfg_t;

endpackage
