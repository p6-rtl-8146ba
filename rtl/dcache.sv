// dcache: the data memory ("D$") of the P6 core, with page-present bits.
//
// WORDS 32-bit words, byte addressed (word index = addr[..:2]; addresses
// beyond the memory wrap). The load unit reads it combinationally during X;
// the only core write comes from retire, for the store at the LSQ head.
// Each PAGE_BYTES page has a present bit, reset to 1; the operating system
// (the test environment here) clears and sets them through the os_* port.
// A load or store to a page whose bit is clear faults, which is how the
// document's page-fault example is reproduced. A host port writes and reads
// words for loading data and checking results; it is meant for use while
// the core is stopped (a host write in the same cycle as a retiring store
// wins and the store is lost). The document treats the D$ as given and
// only says that stores write it at retire; hits in one cycle, no misses,
// the size and the page bits are this design's choices.
module dcache
  import p6_pkg::*;
#(
  parameter int unsigned WORDS      = 256,
  parameter int unsigned PAGE_BYTES = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  // load read (X)
  input  word_t ld_addr,
  output word_t ld_data,
  output logic  ld_fault,
  // store page check (X)
  input  word_t st_addr,
  output logic  st_fault,
  // store commit (R)
  input  logic  we,
  input  word_t waddr,
  input  word_t wdata,
  // host access
  input  logic  host_we,
  input  word_t host_addr,
  input  word_t host_wdata,
  output word_t host_rdata,
  // operating-system page control
  input  logic  os_we,
  input  word_t os_addr,     // any address in the page
  input  logic  os_present
);
  localparam int unsigned IW    = $clog2(WORDS);
  localparam int unsigned PAGES = (WORDS * 4) / PAGE_BYTES;
  localparam int unsigned PW    = $clog2(PAGES);
  localparam int unsigned PLO   = $clog2(PAGE_BYTES);

  word_t            mem [WORDS];
  logic [PAGES-1:0] present;

  function automatic logic [PW-1:0] page_of(word_t a);
    return a[PLO +: PW];
  endfunction

  assign ld_data    = mem[ld_addr[2 +: IW]];
  assign ld_fault   = !present[page_of(ld_addr)];
  assign st_fault   = !present[page_of(st_addr)];
  assign host_rdata = mem[host_addr[2 +: IW]];

  always_ff @(posedge clk) begin
    if (host_we)
      mem[host_addr[2 +: IW]] <= host_wdata;
    else if (we)
      mem[waddr[2 +: IW]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     present <= '1;
    else if (os_we) present[page_of(os_addr)] <= os_present;
  end
endmodule
