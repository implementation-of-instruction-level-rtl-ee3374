// ipsm_top: Instruction-level Parallel Shared-Memory machine, one node.
//
// The machine has two kinds of processing units, like a vector computer has
// a scalar and a vector unit:
//   * the scalar unit, an MPA processor (mpa_core, configuration M5), runs
//     the strictly sequential parts of a program with a two-stage pipeline,
//     out of its own multiport data cache (mpram);
//   * the parallel unit, an MTAC processor (mtac_core, configuration T5),
//     runs the parallel parts as hundreds of threads, one instruction per
//     thread per trip round its thread ring, with its shared-memory
//     references sent to a distributed memory over a network.
// The network between MTAC processors and memory modules (a coated block
// mesh in the full machine) and the synchronization network are outside this
// node: their signals are ports. How work is handed between the two units is
// left to software; they share only clock and reset here.
//
// Interface: clk, rst_n; the mpa_* ports of the scalar unit (program load,
// host port of its data cache, run, halted, retired); the mtac_* ports of the
// parallel unit (program load, thread count, hash function, memory request
// and reply ports, sync, status).
// Timing: see mpa_core and mtac_core.
module ipsm_top
  import ipsm_pkg::*;
#(
  parameter int unsigned MPA_NALU       = 1,
  parameter int unsigned MPA_NMU        = 1,
  parameter int unsigned MPA_NREG       = 32,
  parameter int unsigned MPA_IMEM_DEPTH = 1024,
  parameter int unsigned MPA_DMEM_WORDS = 4096,
  parameter int unsigned MT_NALU        = 1,
  parameter int unsigned MT_NPRE        = 1,
  parameter int unsigned MT_NMU         = 1,
  parameter int unsigned MT_NREG        = 32,
  parameter int unsigned MT_TMIN        = 64,
  parameter int unsigned MT_TMAX        = 512,
  parameter int unsigned MT_IMEM_DEPTH  = 1024,
  parameter int unsigned MT_MODW        = 4,
  localparam int unsigned MPA_PCW = $clog2(MPA_IMEM_DEPTH),
  localparam int unsigned MPA_DAW = $clog2(MPA_DMEM_WORDS),
  localparam int unsigned MPA_IW  = 2 * XLEN + MPA_NALU * $bits(alu_sub_t) + $bits(cmp_sub_t)
                                    + MPA_NMU * $bits(mem_sub_t) + $bits(seq_sub_t)
                                    + MPA_NREG * SRCW,
  localparam int unsigned MT_PCW  = $clog2(MT_IMEM_DEPTH),
  localparam int unsigned MT_TW   = $clog2(MT_TMAX),
  localparam int unsigned MT_IW   = 2 * XLEN + MT_NALU * $bits(alu_sub_t) + $bits(cmp_sub_t)
                                    + MT_NMU * $bits(mem_sub_t) + $bits(seq_sub_t)
                                    + MT_NREG * SRCW
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // scalar unit
  input  logic                              mpa_run,
  input  logic                              mpa_imem_we,
  input  logic [MPA_PCW-1:0]                mpa_imem_addr,
  input  logic [MPA_IW-1:0]                 mpa_imem_wdata,
  input  logic                              mpa_host_cs,
  input  logic                              mpa_host_we,
  input  logic [MPA_DAW-1:0]                mpa_host_addr,
  input  word_t                             mpa_host_wdata,
  output word_t                             mpa_host_rdata,
  output logic                              mpa_halted,
  output logic [MPA_PCW-1:0]                mpa_pc,
  output logic [31:0]                       mpa_retired,
  // parallel unit
  input  logic [MT_TW:0]                    mt_n_threads,
  input  logic                              mt_imem_we,
  input  logic [MT_PCW-1:0]                 mt_imem_addr,
  input  logic [MT_IW-1:0]                  mt_imem_wdata,
  input  word_t                             mt_hash_mult,
  input  word_t                             mt_hash_key,
  output logic [MT_NMU-1:0]                 mt_req_valid,
  output logic [MT_NMU-1:0]                 mt_req_we,
  output logic [MT_NMU-1:0][3:0]            mt_req_be,
  output logic [MT_NMU-1:0][XLEN-1:0]       mt_req_addr,
  output logic [MT_NMU-1:0][MT_MODW-1:0]    mt_req_module,
  output logic [MT_NMU-1:0][XLEN-1:0]       mt_req_data,
  output logic [MT_NMU-1:0][MT_TW-1:0]      mt_req_tag,
  input  logic [MT_NMU-1:0]                 mt_rep_valid,
  input  logic [MT_NMU-1:0][MT_TW-1:0]      mt_rep_tag,
  input  logic [MT_NMU-1:0][XLEN-1:0]       mt_rep_data,
  input  logic                              mt_sync_in,
  output logic                              mt_all_done,
  output logic                              mt_all_frozen,
  output logic                              mt_stall,
  output logic [31:0]                       mt_retired
);

  mpa_core #(
    .NALU(MPA_NALU), .NMU(MPA_NMU), .NREG(MPA_NREG),
    .IMEM_DEPTH(MPA_IMEM_DEPTH), .DMEM_WORDS(MPA_DMEM_WORDS)
  ) u_scalar (
    .clk        (clk),
    .rst_n      (rst_n),
    .run        (mpa_run),
    .imem_we    (mpa_imem_we),
    .imem_addr  (mpa_imem_addr),
    .imem_wdata (mpa_imem_wdata),
    .host_cs    (mpa_host_cs),
    .host_we    (mpa_host_we),
    .host_addr  (mpa_host_addr),
    .host_wdata (mpa_host_wdata),
    .host_rdata (mpa_host_rdata),
    .halted     (mpa_halted),
    .pc         (mpa_pc),
    .retired    (mpa_retired)
  );

  mtac_core #(
    .NALU(MT_NALU), .NPRE(MT_NPRE), .NMU(MT_NMU), .NREG(MT_NREG),
    .TMIN(MT_TMIN), .TMAX(MT_TMAX), .IMEM_DEPTH(MT_IMEM_DEPTH), .MODW(MT_MODW)
  ) u_parallel (
    .clk        (clk),
    .rst_n      (rst_n),
    .n_threads  (mt_n_threads),
    .imem_we    (mt_imem_we),
    .imem_addr  (mt_imem_addr),
    .imem_wdata (mt_imem_wdata),
    .hash_mult  (mt_hash_mult),
    .hash_key   (mt_hash_key),
    .req_valid  (mt_req_valid),
    .req_we     (mt_req_we),
    .req_be     (mt_req_be),
    .req_addr   (mt_req_addr),
    .req_module (mt_req_module),
    .req_data   (mt_req_data),
    .req_tag    (mt_req_tag),
    .rep_valid  (mt_rep_valid),
    .rep_tag    (mt_rep_tag),
    .rep_data   (mt_rep_data),
    .sync_in    (mt_sync_in),
    .all_done   (mt_all_done),
    .all_frozen (mt_all_frozen),
    .stall      (mt_stall),
    .retired    (mt_retired)
  );

endmodule
