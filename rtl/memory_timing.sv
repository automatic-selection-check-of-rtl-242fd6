// memory_timing: cycle sequencer of the memory.
//
// A cycle starts when start_i is seen high in IDLE (the request is taken
// only when busy_o is low).  In that cycle load_o loads the address
// register; SETTLE gives the decoder one clock to settle; READ drives the
// read current pulse (read_o), during which the data, the permanent store
// and the checking cores are sensed, and strobe_o tells the datapath to
// capture them on the clock edge that ends the pulse; WRITE drives the write
// current pulse (write_o), putting back the word just read or storing new
// data.  done_o is high in the WRITE cycle, the last one of the operation.
// One operation thus takes four clocks from the accepted start to the end
// of WRITE, and a new start is accepted in the cycle after done_o.  The
// order read-then-write is that of a destructive-read core memory; the
// number of clocks per phase is this design's choice.
module memory_timing (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  output logic busy_o,
  output logic load_o,
  output logic read_o,
  output logic strobe_o,
  output logic write_o,
  output logic done_o
);

  typedef enum logic [1:0] {
    S_IDLE   = 2'd0,
    S_SETTLE = 2'd1,
    S_READ   = 2'd2,
    S_WRITE  = 2'd3
  } state_e;

  state_e state, state_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_n;
  end

  always_comb begin
    state_n = state;
    case (state)
      S_IDLE:   if (start_i) state_n = S_SETTLE;
      S_SETTLE: state_n = S_READ;
      S_READ:   state_n = S_WRITE;
      S_WRITE:  state_n = S_IDLE;
      default:  state_n = S_IDLE;
    endcase
  end

  assign busy_o   = (state != S_IDLE);
  assign load_o   = (state == S_IDLE) && start_i;
  assign read_o   = (state == S_READ);
  assign strobe_o = (state == S_READ);
  assign write_o  = (state == S_WRITE);
  assign done_o   = (state == S_WRITE);

  // The two current pulses must never overlap.
  assert property (@(posedge clk) !(read_o && write_o));

endmodule
