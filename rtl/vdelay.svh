// Variable propagation delay for the behavioural models, built from
// constant delays only: waits n picoseconds by walking the binary digits
// of n (at most 22 waits, covering delays up to about 4 us).
`ifndef VDELAY_SVH
`define VDELAY_SVH
task automatic vdelay_ps(input int unsigned n);
  if (n[0])  #0.001;
  if (n[1])  #0.002;
  if (n[2])  #0.004;
  if (n[3])  #0.008;
  if (n[4])  #0.016;
  if (n[5])  #0.032;
  if (n[6])  #0.064;
  if (n[7])  #0.128;
  if (n[8])  #0.256;
  if (n[9])  #0.512;
  if (n[10]) #1.024;
  if (n[11]) #2.048;
  if (n[12]) #4.096;
  if (n[13]) #8.192;
  if (n[14]) #16.384;
  if (n[15]) #32.768;
  if (n[16]) #65.536;
  if (n[17]) #131.072;
  if (n[18]) #262.144;
  if (n[19]) #524.288;
  if (n[20]) #1048.576;
  if (n[21]) #2097.152;
endtask
`endif
