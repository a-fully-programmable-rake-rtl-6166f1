// rake_pkg: types and constants shared by the Rake-receiver processor.
// Samples are complex numbers with 16-bit two's complement real and imaginary
// parts (the 16-bit word size follows the document's RISC word; the sample
// width is this design's choice). Short codes are a + jb with a, b in
// {-1, 0, +1}, the set the short complex multiplier of the vector ALU handles.
package rake_pkg;

  localparam int unsigned DW    = 16;  // sample component width
  localparam int unsigned GUARD = 8;   // ALU accumulator guard bits
  localparam int unsigned AW    = DW + 2 + GUARD; // ALU accumulator width (26)
  localparam int unsigned CW    = 40;  // CMAC accumulator width
  localparam int unsigned LANES = 4;   // 4-way complex ALU
  localparam int unsigned CMACS = 2;   // 2-way CMAC

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [AW-1:0] re;
    logic signed [AW-1:0] im;
  } aacc_t;

  typedef struct packed {
    logic signed [CW-1:0] re;
    logic signed [CW-1:0] im;
  } cacc_t;

  // Short code a + jb, a and b each in {-1, 0, +1} (2-bit signed).
  typedef struct packed {
    logic signed [1:0] a;
    logic signed [1:0] b;
  } scode_t;

  // Where the vector ALU takes its per-lane code from.
  typedef enum logic [1:0] {
    CS_INSTR    = 2'd0,  // constant code from the instruction/config
    CS_SCRAMBLE = 2'd1,  // de-scrambling (Gold) code generator
    CS_OVSF     = 2'd2,  // OVSF code generator, one code per lane
    CS_MEM      = 2'd3   // code word read together with the data (pilot / sequence)
  } code_src_e;

  // Vector load unit modes.
  typedef enum logic [1:0] {
    LM_PAR   = 2'd0,  // several items per cycle from a bank of memories
    LM_BCAST = 2'd1,  // one item per cycle, broadcast to every lane
    LM_SLIDE = 2'd2   // one item per cycle into a shift register (lane k sees x[n+k])
  } load_mode_e;

  // Vector ALU operations.
  typedef enum logic [2:0] {
    VA_SMUL  = 3'd0,  // per lane product c*x, stored as a vector
    VA_SMAC  = 3'd1,  // single sum over all lanes (vsmac)
    VA_SMAC4 = 3'd2   // one sum per lane, four results (vsmac4)
  } valu_op_e;

  // Vector CMAC operations.
  typedef enum logic [2:0] {
    VC_MUL   = 3'd0,  // c_i * x_i, one result per element (vmul)
    VC_MAC   = 3'd1,  // sum c_i * x_i split over both datapaths (vmac)
    VC_MAC2  = 3'd2,  // two sums, one per datapath (vmac2)
    VC_ABSQR = 3'd3,  // |x_i|^2 (vabsqr)
    VC_MAX   = 3'd4,  // running maximum of |x_i|^2 and its index (peak search)
    VC_BFLY  = 3'd5   // radix-2 butterfly a +- w*b
  } vcmac_op_e;

  // Memory access request from a computing-element port. The address comes
  // from the AGU of the memory; a request only says "next access".
  typedef struct packed {
    logic                   en;
    logic                   we;
    logic [LANES-1:0]       wmask;   // which of the LANES consecutive words to write
    cplx_t [LANES-1:0]      wdata;
  } mreq_t;

  typedef cplx_t [LANES-1:0] mvec_t;  // LANES consecutive words read

  // Configuration bus written by the controller: addr[7:4] selects a unit,
  // addr[3:0] a register in it.
  typedef struct packed {
    logic        we;
    logic [7:0]  addr;
    logic [15:0] data;
  } cfg_t;

  localparam logic [3:0] U_NET  = 4'd5;
  localparam logic [3:0] U_ALU  = 4'd6;
  localparam logic [3:0] U_CMAC = 4'd7;
  localparam logic [3:0] U_DLY  = 4'd8;

  function automatic logic signed [DW-1:0] sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sh7fff;
    else if (v < -64'sd32768) return 16'sh8000;
    else                      return v[DW-1:0];
  endfunction

endpackage
