// mtac_hash: memory-location hashing of the MTAC hash-calculate (HA) stage.
//
// A shared-memory address is mapped to one of NMOD = 2**MODW memory modules
// of the distributed memory by a hash function picked from a family; if a
// function works badly for an application, another member of the family is
// loaded. The family used here is multiplicative hashing:
//     module = ((addr * mult) ^ key) >> (32 - MODW)    (mult forced odd)
// where mult and key are the programmable members of the family.
//
// Interface: addr (word address), mult, key (the selected hash function);
// module_id. Timing: combinational.
//
// Follows the architecture description: randomized hashing of memory locations over
// memory modules, done in the HA stages, changeable function. This design's
// own choice: the multiplicative family and its two parameters.
module mtac_hash
  import ipsm_pkg::*;
#(
  parameter int unsigned MODW = 4
) (
  input  word_t            addr,
  input  word_t            mult,
  input  word_t            key,
  output logic [MODW-1:0]  module_id
);

  word_t prod;

  assign prod      = (addr * {mult[31:1], 1'b1}) ^ key;
  assign module_id = prod[31 -: MODW];

endmodule
