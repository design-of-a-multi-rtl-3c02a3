// config_memory: holds the fabric's bitstream. A word-addressed register
// file of N_WORDS words of WORD_W bits, written one word per rising clk
// edge when we is high; every bit drives the fabric directly through cfg,
// bit i being bit i % WORD_W of word i / WORD_W. The memory powers up
// cleared, and rst_n (asynchronous, active low) clears it again; a cleared
// memory leaves every routing switch open, so no wire ever has two
// drivers before the bitstream is written. This is an emulation of a
// configuration SRAM; its organisation is this implementation's choice.
// The words above N_BITS in the last word are unused padding.
`timescale 1ns/1ps
module config_memory #(
  parameter int N_BITS = fpga_pkg::FABRIC_CFG,
  parameter int WORD_W = 32,
  localparam int N_WORDS = (N_BITS + WORD_W - 1) / WORD_W,
  localparam int AW      = (N_WORDS > 1) ? $clog2(N_WORDS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [WORD_W-1:0] wdata,
  output logic [N_BITS-1:0] cfg
);
  logic [N_WORDS*WORD_W-1:0] mem = '0;   // emulated memory powers up cleared

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem <= '0;
    else if (we && addr < AW'(N_WORDS)) mem[addr*WORD_W +: WORD_W] <= wdata;
  end

  assign cfg = mem[N_BITS-1:0];
endmodule
