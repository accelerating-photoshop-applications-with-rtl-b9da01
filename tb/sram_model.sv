// sram_model: behavioural model of the board SRAM, for simulation only.
//
// Two asynchronous 16-bit banks of 2**ADDR_W words each, one address bus,
// one output enable and one write enable per bank (active low). A bank drives
// mem[addr] on dout while oe_n is low and zero otherwise. A write stores din
// at the rising edge of we_n, at the address present then. The model checks
// the interface rules and counts each violation in `violations`: address or
// data changing while we_n is low, and oe_n and we_n low together.
//
// host_write/host_read give the testbench the host's view of the memory
// (bank 0 = bits 15:0, bank 1 = bits 31:16) while the FPGA leaves the bus idle.
module sram_model #(
  parameter int unsigned ADDR_W  = 19,
  parameter int unsigned BANK_W  = 16,
  parameter int unsigned N_BANKS = 2
) (
  input  logic [N_BANKS-1:0][ADDR_W-1:0] addr,
  input  logic [N_BANKS-1:0][BANK_W-1:0] din,
  input  logic [N_BANKS-1:0]             din_en,
  input  logic [N_BANKS-1:0]             oe_n,
  input  logic [N_BANKS-1:0]             we_n,
  output logic [N_BANKS-1:0][BANK_W-1:0] dout,
  output int                             violations,
  output int                             writes
);

  logic [BANK_W-1:0] mem [N_BANKS][2**ADDR_W];

  initial begin
    violations = 0;
    writes     = 0;
  end

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    logic [ADDR_W-1:0] a_at_strobe;
    logic [BANK_W-1:0] d_at_strobe;
    bit                armed = 1'b0;   // a falling edge of we_n was seen

    assign dout[b] = oe_n[b] ? '0 : mem[b][addr[b]];

    always @(negedge we_n[b]) begin
      a_at_strobe = addr[b];
      d_at_strobe = din[b];
      armed       = 1'b1;
      if (!din_en[b] || !oe_n[b]) violations++;
    end

    always @(posedge we_n[b]) if (armed) begin
      armed = 1'b0;
      if (addr[b] !== a_at_strobe || din[b] !== d_at_strobe) violations++;
      mem[b][addr[b]] = din[b];
      if (b == 0) writes++;
      if (addr[b] !== a_at_strobe || din[b] !== d_at_strobe) $display("sram_model: bank %0d address or data changed during write strobe", b);
    end
  end

  task automatic host_write(input logic [ADDR_W-1:0] a, input logic [N_BANKS*BANK_W-1:0] w);
    for (int b = 0; b < N_BANKS; b++) mem[b][a] = w[b*BANK_W +: BANK_W];
  endtask

  function automatic logic [N_BANKS*BANK_W-1:0] host_read(input logic [ADDR_W-1:0] a);
    logic [N_BANKS*BANK_W-1:0] w;
    for (int b = 0; b < N_BANKS; b++) w[b*BANK_W +: BANK_W] = mem[b][a];
    return w;
  endfunction

endmodule
