// acc_pkg: types, constants and address-map helpers shared by the accelerator
// platform.
//
// The platform is a window-based image-processing accelerator array attached
// to a CPU through a single memory-mapped bus. Every accelerator core owns a
// window of the bus address space split into four regions (control/context,
// filter coefficients, input pixel memory, output result memory). The helper
// functions below compute the widths of those fields from the design
// parameters so that the bus slave, the interconnect, the cores and the
// testbenches agree on one map.
//
// PE context word (16 bits, one per processing element):
//   [15:13] op     ALU/multiplier operation (pe_op_e)
//   [12]    acc    accumulate: y <= clr ? r : y + r
//   [11:8]  shift  arithmetic right shift applied to a product (fixed point)
//   [7:4]   sel_a  row of the previous PE column feeding operand a
//   [3:0]   sel_b  row of the previous PE column feeding operand b
// The operation set (add, accumulate, subtract, compare, absolute
// difference, multiply) follows the PE description; the encoding and the
// context layout are this design's own.
package acc_pkg;

  localparam int unsigned BUS_W = 32;   // CPU bus data width (B_B)
  localparam int unsigned DW    = 16;   // PE data path width (16-bit fixed point)

  typedef enum logic [2:0] {
    OP_ADD     = 3'd0,
    OP_SUB     = 3'd1,
    OP_MUL     = 3'd2,
    OP_ABSDIFF = 3'd3,
    OP_MAX     = 3'd4,
    OP_MIN     = 3'd5,
    OP_PASSA   = 3'd6,
    OP_PASSB   = 3'd7
  } pe_op_e;

  typedef struct packed {
    pe_op_e     op;
    logic       acc;
    logic [3:0] shift;
    logic [3:0] sel_a;
    logic [3:0] sel_b;
  } pe_ctx_t;

  // Register regions inside one core's address window.
  typedef enum logic [1:0] {
    RG_CTRL = 2'd0,   // control/status, cycle counter, PE contexts
    RG_COEF = 2'd1,   // filter coefficients, {row, col}
    RG_IN   = 2'd2,   // input pixel memory, {lane group, row slot, column}
    RG_OUT  = 2'd3    // output results, {lane group, window position}
  } region_e;

  // Word offsets inside RG_CTRL.
  localparam int unsigned CTRL_REG   = 0;  // W: [0] start, [1] first sequence; R: status
  localparam int unsigned CYCLE_REG  = 1;  // R: cycles of the last sequence run
  localparam int unsigned CTX_BASE   = 8;  // context of PE (row r, column c) at CTX_BASE + c*P_P + r

  // Simple single-cycle internal bus. A read returns data on rdata the cycle
  // after req && !we.
  typedef struct packed {
    logic              req;
    logic              we;
    logic [31:0]       addr;   // word address
    logic [BUS_W-1:0]  wdata;
  } sbus_req_t;

  // Width of a field that must hold values 0 .. n-1 (0 when n <= 1).
  function automatic int unsigned fw(input int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

  function automatic int unsigned imax(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

  function automatic int unsigned cdiv(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Words packed per bus word, Eqs. (5) and (9) for B_B >= word width.
  function automatic int unsigned per_word(input int unsigned bw);
    return (BUS_W >= bw) ? BUS_W / bw : 1;
  endfunction

  // Number of PE columns for pixel parallelism pp: log2(pp) + 1.
  function automatic int unsigned pe_cols(input int unsigned pp);
    return fw(pp) + 1;
  endfunction

  // Width of the word offset inside one region of a core.
  function automatic int unsigned core_off_w(
      input int unsigned n_w, input int unsigned p_p, input int unsigned w_h,
      input int unsigned w_w, input int unsigned p_w, input int unsigned b_ca,
      input int unsigned b_ac);
    int unsigned nx, w_in, w_out, w_coef, w_ctrl;
    nx     = p_w - w_w + 1;
    w_in   = fw(cdiv(n_w, per_word(b_ca))) + fw(w_h) + fw(p_w);
    w_out  = fw(cdiv(n_w, per_word(b_ac))) + fw(nx);
    w_coef = fw(w_h) + fw(w_w);
    w_ctrl = fw(CTX_BASE + p_p * pe_cols(p_p));
    return imax(imax(w_in, w_out), imax(w_coef, w_ctrl));
  endfunction

endpackage
