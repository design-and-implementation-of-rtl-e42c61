// gnss_code_model: testbench-side reference for GNSS Gold codes and for the
// expanded, sampled code replica. It is written independently of the RTL
// generator, with integer arrays for the shift registers (index 0 is
// stage 1). Chips are returned as +1 / -1.
package gnss_code_model;

  // GPS C/A phase-selector stages, PRN 1..32 (from the GPS signal definition).
  localparam int GPS_S1 [32] = '{2,3,4,5,1,2,1,2,3,2,3,5,6,7,8,9,1,2,3,4,5,6,1,4,5,6,7,8,1,2,3,4};
  localparam int GPS_S2 [32] = '{6,7,8,9,9,10,8,9,10,3,4,6,7,8,9,10,4,5,6,7,8,9,3,6,7,8,9,10,6,7,8,9};

  // irnss = 0: GPS PRN prn; irnss = 1: G2 starts from init (bit k = stage k+1).
  function automatic void gold(input bit irnss, input int prn, input bit [9:0] init,
                               output int code [1023]);
    int r1 [10];
    int r2 [10];
    int f1, f2, o2;
    for (int s = 0; s < 10; s++) begin
      r1[s] = 1;
      r2[s] = irnss ? int'(init[s]) : 1;
    end
    for (int n = 0; n < 1023; n++) begin
      if (irnss) o2 = r2[9];
      else       o2 = r2[GPS_S1[prn-1]-1] ^ r2[GPS_S2[prn-1]-1];
      code[n] = ((r1[9] ^ o2) != 0) ? -1 : 1;
      f1 = r1[2] ^ r1[9];
      f2 = r2[1] ^ r2[2] ^ r2[5] ^ r2[7] ^ r2[8] ^ r2[9];
      for (int s = 9; s > 0; s--) begin
        r1[s] = r1[s-1];
        r2[s] = r2[s-1];
      end
      r1[0] = f1;
      r2[0] = f2;
    end
  endfunction

  // Sample n of the replica at ns samples per code: chip floor(n*1023/ns).
  function automatic int replica(input int code [1023], input int n, input int ns);
    return code[(longint'(n) * 1023) / ns];
  endfunction

endpackage
