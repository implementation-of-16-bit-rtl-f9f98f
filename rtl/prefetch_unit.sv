// prefetch_unit: small instruction buffer in front of the fetch stage.
//
// The buffer holds DEPTH words, each with its address and a valid bit, and
// is searched by address like a tiny fully associative cache rather than
// read in FIFO order. In every cycle in which stage 4 does not use the
// shared memory bus, the unit reads the first word of the window
// PC .. PC+DEPTH-1 that it does not yet hold and writes it into an empty
// entry or into one whose address has left the window. If that word is the
// one at PC it is also passed straight to the fetch stage in the same cycle,
// so a miss costs no extra cycle when the bus is free. A store to an address
// the buffer holds invalidates that entry.
//
// The four-word depth, prefetching while the processor does not use the
// external memory, and the cache-like rather than FIFO organisation follow
// the reference design. The window, replacement and bypass rules are this
// design's own. Interface: hit/instr are combinational from pc and the
// entries; entries update on the rising edge; synchronous reset empties the
// buffer.
module prefetch_unit
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  word_t pc,
  input  logic  bus_busy,     // stage 4 owns the memory bus this cycle
  input  word_t mem_rdata,
  output word_t pf_addr,
  output logic  pf_re,
  input  logic  st_we,
  input  word_t st_addr,
  output word_t instr,
  output logic  hit
);

  typedef struct packed {
    logic  valid;
    word_t addr;
    word_t data;
  } entry_t;

  entry_t ent [DEPTH];

  logic                     need;
  logic [$clog2(DEPTH)-1:0] miss_k, victim;
  logic                     buf_hit;
  word_t                    buf_word;

  // lookup at PC
  always_comb begin
    buf_hit  = 1'b0;
    buf_word = '0;
    for (int i = 0; i < DEPTH; i++)
      if (ent[i].valid && ent[i].addr == pc) begin
        buf_hit  = 1'b1;
        buf_word = ent[i].data;
      end
  end

  // first address of the window not held
  always_comb begin
    need   = 1'b0;
    miss_k = '0;
    for (int k = DEPTH - 1; k >= 0; k--) begin
      logic held;
      held = 1'b0;
      for (int i = 0; i < DEPTH; i++)
        if (ent[i].valid && ent[i].addr == pc + word_t'(k)) held = 1'b1;
      if (!held) begin
        need   = 1'b1;
        miss_k = k[$clog2(DEPTH)-1:0];
      end
    end
  end

  // entry to replace: empty or outside the window
  always_comb begin
    victim = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!ent[i].valid || (ent[i].addr - pc) >= word_t'(DEPTH))
        victim = i[$clog2(DEPTH)-1:0];
  end

  assign pf_re   = need && !bus_busy;
  assign pf_addr = pc + word_t'(miss_k);
  assign hit     = buf_hit || (pf_re && miss_k == '0);
  assign instr   = buf_hit ? buf_word : mem_rdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++)
        if (st_we && ent[i].valid && ent[i].addr == st_addr) ent[i].valid <= 1'b0;
      if (pf_re) ent[victim] <= '{valid: 1'b1, addr: pf_addr, data: mem_rdata};
    end
  end

endmodule
