// core_check_pkg: types and functions shared by the linear-selection core
// memory and its selection-check circuitry.
//
// The check circuitry compares a code fed by the computer with a code read
// back from the word lines.  Which code is used is chosen by subset_e:
//   SUBSET_ADDRESS  the address itself (Method I, full re-encoding, D = K)
//   SUBSET_PARITY   parity of the address (Method II, simplest form, D = 1;
//                   the form used in the 4096-word, 28-bit memory)
//   SUBSET_ONES     number of ONEs in the address (Method II extension,
//                   D = ceil(log2(K+1)))
// subset_code() gives the code of one address, code_width() the number D of
// redundant positions a mode needs.  The fault record sel_fault_t lets a test
// make the addressing circuitry misbehave in the ways the check must catch:
// the selected line missing, an extra line driven, or a decoder input bit
// inverted (a wrong line selected).
package core_check_pkg;

  // Largest address width the fault record can describe.
  localparam int unsigned ADDR_MAX_W = 16;

  typedef enum logic [1:0] {
    SUBSET_ADDRESS = 2'd0,
    SUBSET_PARITY  = 2'd1,
    SUBSET_ONES    = 2'd2
  } subset_e;

  typedef enum logic {
    OP_READ  = 1'b0,
    OP_WRITE = 1'b1
  } mem_op_e;

  // Addressing faults injected into the decoder (all zero: fault free).
  typedef struct packed {
    logic                  drop_sel;    // no current on the selected line
    logic                  extra_en;    // drive one more line as well
    logic [ADDR_MAX_W-1:0] extra_line;  // index of that line
    logic [ADDR_MAX_W-1:0] addr_flip;   // decoder input bits inverted
  } sel_fault_t;

  function automatic int unsigned ones_count(int unsigned a, int unsigned k);
    int unsigned n = 0;
    for (int unsigned j = 0; j < k; j++) n += (a >> j) & 1;
    return n;
  endfunction

  function automatic int unsigned clog2_min1(int unsigned v);
    int unsigned w = 1;
    while ((1 << w) < v) w++;
    return w;
  endfunction

  // Number of redundant code positions D for a K-bit address.
  function automatic int unsigned code_width(subset_e mode, int unsigned k);
    case (mode)
      SUBSET_ADDRESS: return k;
      SUBSET_PARITY:  return 1;
      default:        return clog2_min1(k + 1);
    endcase
  endfunction

  // Code of the subset the address a belongs to.
  function automatic int unsigned subset_code(subset_e mode, int unsigned a,
                                              int unsigned k);
    case (mode)
      SUBSET_ADDRESS: return a;
      SUBSET_PARITY:  return ones_count(a, k) & 1;
      default:        return ones_count(a, k);
    endcase
  endfunction

  // Largest word the permanent store can hold.
  localparam int unsigned PSTORE_MAX_W = 64;

  // Word wired into the permanent store on line l.  Placeholder contents
  // (the store is wired at manufacture and the contents depend on its use):
  // the K address bits of l, then their complements, repeated.
  function automatic logic [PSTORE_MAX_W-1:0] pstore_word(int unsigned l,
                                                          int unsigned k);
    logic [PSTORE_MAX_W-1:0] v;
    for (int unsigned w = 0; w < PSTORE_MAX_W; w++)
      v[w] = 1'((l >> (w % k)) & 1) ^ 1'((w / k) % 2);
    return v;
  endfunction

endpackage
