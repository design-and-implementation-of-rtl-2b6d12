// dpm_ref_pkg -- cycle-level reference model of the dual-port memory, for
// the testbenches.
//
// dpm_ref_model::clock() advances the model by one memory clock edge with
// the inputs present at that edge, in the order the hardware works: first
// the output registers load from the array at the registered addresses
// (contents before this edge's writes), then the address/control registers
// take the new inputs, then the arbitrated writes update the array. Each
// word carries a "known" flag so that reads of never-written words, whose
// contents are undefined after power-up, are not compared.
package dpm_ref_pkg;

  class dpm_ref_model #(int unsigned AW = 8, int unsigned DW = 8);
    int unsigned depth;
    int unsigned prot_end;

    bit [DW-1:0] mem   [];
    bit          known [];

    bit [AW-1:0] a1p, a2p;
    bit          rd1p, rd2p, spp;

    bit [DW-1:0] out1, out2;
    bit          out1_known, out2_known;

    function new(int unsigned depth_i, int unsigned prot_end_i);
      depth    = depth_i;
      prot_end = prot_end_i;
      mem      = new[depth];
      known    = new[depth];
      foreach (known[i]) known[i] = 1'b0;
      reset();
    endfunction

    function void reset();
      a1p = '0; a2p = '0; rd1p = 1'b0; rd2p = 1'b0; spp = 1'b0;
      out1 = '0; out2 = '0; out1_known = 1'b1; out2_known = 1'b1;
    endfunction

    // 0: Port 2 write done or no Port 2 write; 1: dropped for a Port 1
    // write to the same address; 2: protected address; 3: single-port mode.
    function int unsigned p2_outcome(bit sp, bit wr1, bit [AW-1:0] a1,
                                     bit wr2, bit [AW-1:0] a2);
      if (!wr2)              return 0;
      if (sp)                return 3;
      if (int'(a2) < int'(prot_end)) return 2;
      if (wr1 && a1 == a2)   return 1;
      return 0;
    endfunction

    function void clock(bit sp,
                        bit wr1, bit [AW-1:0] a1, bit [DW-1:0] d1,
                        bit wr2, bit [AW-1:0] a2, bit [DW-1:0] d2);
      bit p2_write;
      p2_write = wr2 && (p2_outcome(sp, wr1, a1, wr2, a2) == 0);
      // output registers
      if (rd1p) begin out1 = mem[a1p]; out1_known = known[a1p]; end
      if (spp) begin out2 = '0; out2_known = 1'b1; end
      else if (rd2p) begin out2 = mem[a2p]; out2_known = known[a2p]; end
      // address / control registers
      a1p  = a1;
      rd1p = !wr1;
      if (!sp) a2p = a2;
      rd2p = !wr2 && !sp;
      spp  = sp;
      // array
      if (wr1)      begin mem[a1] = d1; known[a1] = 1'b1; end
      if (p2_write) begin mem[a2] = d2; known[a2] = 1'b1; end
    endfunction
  endclass

endpackage
