// fm0_pkg: sizes shared by the FM0 transmit path.
// The word width and the number of stored words are not fixed by the FM0
// scheme itself; the values here are this design's defaults (an 8-bit word,
// a 16-word memory) and every module takes them as overridable parameters.
package fm0_pkg;
  parameter int unsigned DATA_W    = 8;   // bits per stored word
  parameter int unsigned MEM_DEPTH = 16;  // words held by the memory block
endpackage
