// pe_pkg: types and constants shared by the processing elements (PEs), the
// switch blocks and the control processor of the 3D-SoftChip.
//
// A PE is driven by a 19-bit instruction word.  Its field layout follows the
// published format: bit 18 SRAM write (1) / read (0), bit 17 register write
// (1) / read (0), bit 16 SRAM enable, bits 15..12 SRAM word select, bits
// 11..10 register select, bit 9 output-register load, bits 8..6 operation,
// bits 5..3 operand-B multiplexer, bits 2..0 operand-A multiplexer.
// The numeric opcode values follow the order in which the functions are
// listed for each PE type; the multiplexer source codes and the control
// processor's instruction set are choices of this design.
package pe_pkg;

  localparam int PE_DW         = 4;   // basic PE word length (bits)
  localparam int PE_IW         = 19;  // PE instruction width
  localparam int PE_NREG       = 4;   // registers per PE
  localparam int PE_SRAM_DEPTH = 16;  // words of local SRAM per PE
  localparam int PE_NISET      = 4;   // stored 19-bit instructions per PE

  // What a PE command from the control processor does (switch block)
  typedef enum logic [1:0] {
    PEI_DIRECT = 2'd0,  // execute the instruction carried by the command
    PEI_STORE  = 2'd1,  // store it into an instruction register, no execution
    PEI_EXEC   = 2'd2   // execute each PE's own stored instruction
  } pei_mode_e;

  typedef struct packed {
    logic       ws_en;     // 18: 1 = write SRAM word, 0 = read
    logic       wr_en;     // 17: 1 = write selected register, 0 = read
    logic       sram_en;   // 16: SRAM access enable
    logic [3:0] sram_sel;  // 15..12: SRAM word
    logic [1:0] reg_sel;   // 11..10: register
    logic       dout_ld;   // 9: load output register
    logic [2:0] op;        // 8..6: operation
    logic [2:0] mux_b;     // 5..3: operand B source
    logic [2:0] mux_a;     // 2..0: operand A source
  } pe_instr_t;

  // Standard PE operations
  typedef enum logic [2:0] {
    SPE_AND = 3'd0, SPE_OR = 3'd1, SPE_XOR = 3'd2, SPE_ADD = 3'd3,
    SPE_SUB = 3'd4, SPE_SPMUL = 3'd5, SPE_COMP = 3'd6, SPE_ABS = 3'd7
  } spe_op_e;

  // Processing-accelerator PE operations
  typedef enum logic [2:0] {
    PA_PAMUL = 3'd0, PA_MAC = 3'd1, PA_MAS = 3'd2, PA_LSL = 3'd3,
    PA_LSR = 3'd4, PA_ASR = 3'd5, PA_ROR = 3'd6, PA_ABS = 3'd7
  } pape_op_e;

  // Operand multiplexer sources
  typedef enum logic [2:0] {
    SRC_BUS = 3'd0, SRC_W = 3'd1, SRC_E = 3'd2, SRC_N = 3'd3,
    SRC_S = 3'd4, SRC_REG = 3'd5, SRC_SRAM = 3'd6, SRC_OUT = 3'd7
  } mux_src_e;

  // Word-length configuration of the S-PE chain
  typedef enum logic [1:0] {
    WL_4 = 2'd0, WL_8 = 2'd1, WL_16 = 2'd2, WL_32 = 2'd3
  } wl_mode_e;

  // Compare chain flags
  typedef struct packed {
    logic gt;
    logic lt;
    logic eq;
  } cmp_t;

  function automatic logic [PE_IW-1:0] pe_instr(
      input logic ws, input logic wr, input logic sram_en, input logic [3:0] sram_sel,
      input logic [1:0] reg_sel, input logic dout_ld, input logic [2:0] op,
      input logic [2:0] mux_b, input logic [2:0] mux_a);
    pe_instr_t i;
    i = '{ws, wr, sram_en, sram_sel, reg_sel, dout_ld, op, mux_b, mux_a};
    return i;
  endfunction

endpackage
