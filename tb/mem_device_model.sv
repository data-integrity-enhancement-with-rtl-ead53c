// mem_device_model -- behavioural model of an external 8-bit or 16-bit wide
// memory device, used by the testbenches only.
//
// A synchronous single-port memory over the full 32-bit byte address space,
// stored sparsely. On a clock edge with en and we it stores wdata at addr;
// with en and not we it presents the word at addr on rdata from that edge
// on (one cycle of read latency). Words never written read as zero. For a
// 16-bit device addr is a byte address and must be even. peek/poke/flip
// give the testbench direct access to the cells, for checking and for
// injecting upsets. It counts the read and write beats it serves and the
// odd addresses it was given as a 16-bit device.
module mem_device_model #(
  parameter int unsigned W = 8
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [31:0]   addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [logic [31:0]];
  int unsigned  n_reads  = 0;
  int unsigned  n_writes = 0;
  int unsigned  n_bad    = 0;   // odd addresses seen on a 16-bit device

  initial rdata = '0;

  always @(posedge clk)
    if (en) begin
      if (W == 16 && addr[0]) n_bad++;
      if (we) begin
        mem[addr] = wdata;
        n_writes++;
      end else begin
        rdata <= mem.exists(addr) ? mem[addr] : '0;
        n_reads++;
      end
    end

  function automatic logic [W-1:0] peek(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void poke(input logic [31:0] a, input logic [W-1:0] v);
    mem[a] = v;
  endfunction

  function automatic void flip(input logic [31:0] a, input int unsigned b);
    logic [W-1:0] v;
    v = peek(a);
    v[b] = ~v[b];
    mem[a] = v;
  endfunction

endmodule
